2c0ffa6
2c0fec9
340fe21
340fdb0
340fd3d
340fcc9
340fc54
340fbdc
340fb62
340fae5
34106de
341075b
34107d6
341084d
2c108f8
2c109cf
2c10a94
2c10b45
2c10be1
2c10c67
2410d01
1c10d70
2410cea
24222dc
1c22333
1c4381d
