4400
8810
4001
4988
0702
0000
1006
0000
