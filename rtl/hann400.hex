0000
0002
0008
0012
0020
0033
0049
0063
0082
00a4
00cb
00f5
0124
0156
018d
01c7
0205
0248
028e
02d8
0326
0378
03cd
0427
0484
04e5
054a
05b3
061f
068f
0703
077a
07f5
0873
08f5
097a
0a03
0a8f
0b1f
0bb2
0c48
0ce2
0d7f
0e1f
0ec2
0f68
1012
10be
116e
1220
12d6
138e
1449
1507
15c7
168a
1750
1819
18e4
19b1
1a81
1b53
1c28
1cff
1dd8
1eb3
1f91
2070
2151
2235
231a
2401
24ea
25d5
26c1
27af
289e
298f
2a81
2b75
2c6a
2d60
2e58
2f50
304a
3145
3240
333d
343a
3538
3636
3736
3835
3936
3a37
3b38
3c39
3d3b
3e3d
3f3f
4041
4142
4244
4346
4448
4549
464a
474a
484b
494a
4a49
4b47
4c45
4d42
4e3e
4f39
5033
512c
5224
531b
5410
5505
55f8
56e9
57da
58c8
59b5
5aa1
5b8b
5c73
5d59
5e3d
5f20
6000
60de
61bb
6295
636d
6443
6516
65e7
66b6
6782
684c
6913
69d8
6a99
6b59
6c15
6ccf
6d85
6e39
6eea
6f98
7043
70eb
7190
7232
72d0
736b
7403
7498
7529
75b7
7642
76c9
774d
77cd
7849
78c2
7938
79a9
7a18
7a82
7ae9
7b4c
7bab
7c06
7c5e
7cb2
7d02
7d4e
7d96
7dda
7e1a
7e57
7e8f
7ec4
7ef4
7f21
7f49
7f6d
7f8e
7faa
7fc3
7fd7
7fe7
7ff3
7ffb
7fff
7fff
7ffb
7ff3
7fe7
7fd7
7fc3
7faa
7f8e
7f6d
7f49
7f21
7ef4
7ec4
7e8f
7e57
7e1a
7dda
7d96
7d4e
7d02
7cb2
7c5e
7c06
7bab
7b4c
7ae9
7a82
7a18
79a9
7938
78c2
7849
77cd
774d
76c9
7642
75b7
7529
7498
7403
736b
72d0
7232
7190
70eb
7043
6f98
6eea
6e39
6d85
6ccf
6c15
6b59
6a99
69d8
6913
684c
6782
66b6
65e7
6516
6443
636d
6295
61bb
60de
6000
5f20
5e3d
5d59
5c73
5b8b
5aa1
59b5
58c8
57da
56e9
55f8
5505
5410
531b
5224
512c
5033
4f39
4e3e
4d42
4c45
4b47
4a49
494a
484b
474a
464a
4549
4448
4346
4244
4142
4041
3f3f
3e3d
3d3b
3c39
3b38
3a37
3936
3835
3736
3636
3538
343a
333d
3240
3145
304a
2f50
2e58
2d60
2c6a
2b75
2a81
298f
289e
27af
26c1
25d5
24ea
2401
231a
2235
2151
2070
1f91
1eb3
1dd8
1cff
1c28
1b53
1a81
19b1
18e4
1819
1750
168a
15c7
1507
1449
138e
12d6
1220
116e
10be
1012
0f68
0ec2
0e1f
0d7f
0ce2
0c48
0bb2
0b1f
0a8f
0a03
097a
08f5
0873
07f5
077a
0703
068f
061f
05b3
054a
04e5
0484
0427
03cd
0378
0326
02d8
028e
0248
0205
01c7
018d
0156
0124
00f5
00cb
00a4
0082
0063
0049
0033
0020
0012
0008
0002
0000
