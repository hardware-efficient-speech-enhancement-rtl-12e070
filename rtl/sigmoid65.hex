0000
0000
0001
0001
0001
0001
0002
0002
0003
0003
0004
0005
0007
0009
000b
000e
0012
0018
001e
0026
0031
003e
004e
0062
007a
0098
00bb
00e4
0113
0149
0183
01c0
0200
0240
027d
02b7
02ed
031c
0345
0368
0386
039e
03b2
03c2
03cf
03da
03e2
03e8
03ee
03f2
03f5
03f7
03f9
03fb
03fc
03fd
03fd
03fe
03fe
03ff
03ff
03ff
03ff
0400
0400
