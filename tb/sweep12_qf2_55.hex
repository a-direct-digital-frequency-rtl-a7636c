0a062008b
12062006a
120c30571
0e0c3059e
0e0e90d93
0e0e31763
0e16624cc
0e246363b
