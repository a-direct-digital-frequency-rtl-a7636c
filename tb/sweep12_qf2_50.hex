0a062008b
0e0620038
0e0c3059e
0e0e90d93
0e0e31763
0a1c52cf7
