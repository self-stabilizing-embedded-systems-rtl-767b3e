9010
0000
0000
9710
0000
0001
9510
0000
0002
9810
0000
0020
9900
0000
0003
8100
8dd0
9010
0000
0000
9810
0000
0020
9200
0000
006b
9621
0000
0001
9820
0000
0000
9200
0000
0064
8232
f530
7fff
7eff
9300
0000
006a
8243
8343
9060
0000
001e
8461
8464
9300
0000
006a
8261
9560
0000
0001
9676
0000
0001
828d
8487
9300
0000
006a
9880
0000
000b
9300
0000
0049
9100
0000
006a
9510
0000
0002
9830
0000
0000
9200
0000
0014
9621
0000
0001
9820
0000
0200
9900
0000
006a
9510
0000
0002
f530
7fff
7fff
9100
0000
004c
9510
0000
0002
9100
0000
0014
8000
8ea0
8dd0
9010
0000
0000
9810
0000
0020
9200
0000
00ac
9621
0000
0001
9820
0000
0000
9200
0000
00a6
8232
f530
7fff
7f00
8261
9560
0000
0001
9676
0000
0001
828d
8487
9880
0000
0002
9300
0000
00a1
9710
0000
0001
9510
0000
0002
f530
7fff
7fff
9900
0000
0092
9100
0000
0070
8313
8313
9100
0000
0070
9510
0000
0002
9100
0000
0070
829a
9040
0000
0003
8594
9590
0000
0001
9010
0000
0000
9050
0000
0000
90b0
0000
0000
9810
0000
0020
9200
0000
0117
9621
0000
0001
9820
0000
0000
9900
0000
00e1
9850
0000
0000
9900
0000
00d3
82b1
9550
0000
0001
9510
0000
0002
8245
8449
9200
0000
00ea
9100
0000
00bd
9050
0000
0000
9510
0000
0002
9100
0000
00bd
8229
9520
0000
0100
97b2
0000
0001
8c70
826b
9560
0000
0001
9767
0000
0001
826b
836b
976a
0000
0002
f590
7fff
7fff
821b
9890
0000
0000
9200
0000
0117
9510
0000
0002
9020
0000
0200
9712
0000
0001
f590
7fff
7fff
9100
0000
0102
9010
0000
0000
90c0
0000
0000
90e0
0000
0000
9810
0000
0020
9200
0000
0144
9621
0000
0001
9820
0000
0000
9200
0000
013e
9820
0000
0200
9200
0000
013b
8261
8361
9676
0000
0002
83e7
95c0
0000
0001
9510
0000
0002
9100
0000
0120
8a0c
8a1e
8100
9100
0000
0010
