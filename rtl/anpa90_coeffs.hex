2206200034
220620007d
22062000c5
220620010d
2206200155
220620019d
22062001e4
220620022b
2206200272
22062002b8
22062002fd
2206200342
2206200386
22062003c9
220620040c
220620044d
220620048e
22062004ce
220620050c
220620054a
2206200586
22062005c1
22062005fb
2206200634
220620066b
22062006a0
22062006d4
2206200707
1e0620074f
1e062007aa
1e062007fd
1e06200848
1e0620088b
1e062008c4
1a06200909
1a06200942
1606200943
1e062008f0
1e062008b7
1e06200870
1e0620081b
22062007d2
220620079c
2206200762
2206200725
22062006e3
220620069d
2206200654
2206200606
22062005b4
220620055e
2206200503
26062004bd
260620048c
260620045a
2606200428
26062003f4
26062003bf
2606200389
2606200351
2606200319
26062002df
26062002a5
2606200269
260620022c
26062001ed
260c3053ec
260c30542b
260c305469
260c3054a6
260c3054e2
260c30551d
260c305556
260c30558e
260c3055c5
260c3055fa
260c30562f
260c305662
260c305694
260c3056c4
220c30570b
220c305764
220c3057b8
220c305807
220c305851
220c305895
220c3058d4
220c30590d
220c305941
1e0c305984
1a0c3059e5
1a0c305a11
1e0c3059f9
1e0c3059c9
1e0c305980
220c305938
220c305900
220c409301
220c40933d
1e0c40938a
1e0c4093d9
1e0c40940e
1a0c409427
1e0c409409
1e0c50b48f
1a0c50b4c3
160c60c5db
160e60e9ba
1a0e50fc6e
1a0e412366
1a0e41235c
1e0e4122fe
220e4122b3
220e317635
220e317670
220e3176a2
1e0e3176de
1a0e31771a
1e0e31770b
1e0e3176d5
220e317695
220e31765f
221441d160
221441d198
1e1441d1dc
1e1441d218
1a1441d22b
1614520252
1616823a9e
1a165267f6
1e165267d0
1e16429d44
1a16429d4a
1a1c52d44b
161c72fe98
161e534738
1626838ac3
163483d83a
