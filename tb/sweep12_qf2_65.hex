120620034
120620073
0e062009c
16062007c
160620053
160c30556
160c30587
120c305a7
120c40942
0e0e90d93
0e0e31763
1214621af
1216429d0
0e246363b
