1103145000054
11031450000dc
1103145000162
11031450001e5
1103145000265
11031450002e1
1103145000357
11031450003c7
1103145000430
1103145000491
0f03145000510
0d031450005c4
0d031450005f1
0f03145000560
11031450004d4
110314500045c
11031450003cd
1103145000327
130314500029a
1303145000234
13031450001c8
1303145000155
13031450000dc
13031460039db
1303146003a54
1303146003ac6
1303146003b30
1303146003b94
1103146003c1b
1103146003cb4
1103146003d2e
0f03146003da8
0f03146003dd3
0f03146003d74
0f0314700657d
0f031470065e5
0d03148007c3e
0d0316a009a47
0d0316700c7d8
110316700c774
1103166010066
0f031660100a3
1103166010070
1103166010002
130316600ff8a
130316600ff27
130316600feb6
1303165017db5
1303165017e25
1303165017e87
1103165017efc
0f03165017f7e
0f03165017f4d
1103165017e7f
1303165017de0
1303165017d62
1303165017cd2
1303165017c32
1303165017b80
1503165017af0
1503165017a8a
1503165017a20
15031650179b2
150316501793f
15031650178c8
150316501784d
150316402a54d
150316402a5c9
150316402a640
150316402a6b3
150316402a721
150316402a78c
150316402a7f1
130316402a881
130316402a931
130316402a9cf
130316402aa5b
130316402aad5
130316402ab3c
0d0316402ac01
110316402ab62
130316402aac9
130316402aa4b
130316402a9b8
130316402a912
150316402a888
150316402a826
150316402a7be
150316402a752
150316402a6e1
150316402a66a
150316402a5ef
15061c50408ee
15061c5040968
15061c50409dd
15061c5040a4d
15061c5040ab7
15061c5040b1d
15061c5040b7d
13061c5040c04
13061c5040ca6
13061c5040d32
13061c5040daa
13061c5040e0c
11061c5040e78
0f061c5040eb5
11061c5040e41
13061c5040db8
13061c604d0c1
11061c604d165
11061c604d1f1
0f061c604d216
0f061c7053804
0f061c8056c03
0f061e905bb44
0f061e7060c06
0f061e60679fe
11061e60679bd
13061e6067944
13061e60678d3
11061e5075cfb
11061e5075d81
0f061e5075d89
13061e5075cde
13061e5075c6c
1106246084a8f
0f06246084b17
0f0624708c571
0f06248090386
0f06268098168
0f0626709c122
0f062660a428c
0f062c70ac627
0f062ec0b5030
0f062e70bd3ff
0f0634a0c4cce
0f063c90cc743
0f064d10d5511
0f073c90de541
0f073490e7765
0f073680ee65a
0f072c80f7c18
0f072e81013dc
11072e710606e
110724610fb53
110724610fb36
1107247119817
0f07249120ee8
0f072681286df
0f07266137a0d
11072661379ec
130726613796b
13071c514c46b
0f071c514c512
11071c514c4d1
13071c514c43b
13071c616172c
0f071c61617a4
0f071c716c3bc
0f071eb177c9d
0f071e718217b
0f071e618d31c
13071e618d261
13071e51a3b57
11071e51a3bc6
11071e51a3bdf
11071e51a3b69
110a2461bab64
110a2461babd1
0f0a2471c6666
0f0a24a1d0b2f
0f0a2671de105
0f0a2661ea0f8
0f0a2c71f62ac
0f0a2e820887c
0f0a348214e89
0f0a3c9224885
0f0a56f232c97
0f0b3eb241e0d
0f0b3692512b5
0f0b2c82616d5
0f0b2e826e8d4
0f0b2462826fd
0f0b24728fd31
0f0b26a29f02b
0f0b2672aae92
110b2662b89d6
110e2c72c66c2
0f0e2c92d0d71
0f0e2e72e256a
0f0e3692f3ff7
0f0e44b304ec8
0f0f46a315fe6
0f0f34a3281e8
0f0f2c7338918
0f0f2e934aff3
0f1234835d95d
0f123c9370552
0f12750383172
0f133e93964da
0f133683a986f
0f164cb3bbefd
0f173cb3cf783
0f1b56c3e2aaa
0f2256e3f6238
