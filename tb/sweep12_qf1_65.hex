340ffdd
3c0ff8a
3c0ff53
3c0ff1c
3c0fee4
3c0fead
3c0fe75
3c0fe3d
3c0fe05
3c0fdcc
3c0fd93
3c0fd5a
3c0fd21
3c0fce7
3c0fcac
3c0fc71
3c0fc36
3c0fbfa
3c0fbbd
3c0fb80
3c0fb43
3c0fb04
3c0fac5
3c106be
3c106fd
3c1073c
3c1077a
3c107b7
3c107f4
3c1082f
3c1086a
3c108a4
3c108dc
3c10914
3c1094b
3c10980
3c109b5
3410a02
3410a64
3410ac2
3410b1b
3410b6e
3410bbc
3410c05
3410c48
3410c85
2c10cd4
2c10d28
1c10d70
2c10d17
3410cd0
3410c97
3422290
34222c5
2c22303
1c22333
1c4381d
