8e10
9620
0000
0000
9520
0000
0001
9030
0000
0007
8523
9702
0000
0000
9721
0000
0001
8d40
8262
9560
0000
0008
9764
0000
0001
9400
0000
0023
8a07
8c80
8a18
8100
9100
0000
0000
9050
0000
0008
9070
0000
0000
9090
0000
0000
96a9
0000
0001
837a
82b9
95b0
0000
0008
96cb
0000
0001
8b0c
9590
0000
0001
f550
7fff
7fff
9900
0000
002c
8800
