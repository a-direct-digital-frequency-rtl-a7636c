240ff38
240fd77
240fb9f
2410799
2410966
2410aef
1c10ca1
1c10d70
1c22272
1433080
