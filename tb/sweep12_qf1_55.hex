2c0ffa6
2c0fec9
2c0fde9
2c0fd04
2c0fc18
2c0fb24
2c1071d
2c10812
2c108f8
2c109cf
2c10a94
2c10b45
2410c27
2410d01
1c10d70
2410cea
24222dc
1c22333
1c4381d
