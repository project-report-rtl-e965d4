00b4
00c8
00f0
0116
0141
016a
0193
01bb
01e3
020a
0232
025a
0281
02a8
02d1
02fa
0321
0348
0370
039a
03c1
03eb
0414
043a
0463
048a
04b3
04da
0503
052b
0553
057a
05a2
05ca
05f2
061a
0642
066a
0692
06ba
06e2
0709
0731
0b17
0b40
0b68
0b8f
0bb6
0bde
0c06
0c2f
0c56
0c7e
0ca6
0cce
0cf6
0d1e
0d45
0d70
0d98
0dc0
0de4
0e0c
0e34
0e5c
0e85
0eac
0ed4
0efb
0f24
0f4b
0f71
0f98
0fc2
0feb
1014
103c
1064
108b
10b3
10db
1103
112b
1153
117b
11a2
11cb
11f2
121a
1243
126c
1292
12bb
12e2
130a
1332
135a
1382
13aa
13d1
13f9
1421
144a
1471
1499
14c2
14e8
1510
153a
1560
1588
15b0
15d9
15ff
1628
164f
1677
169f
16c7
16ee
1717
173f
1768
178f
17b9
17df
1808
182e
1856
187e
18a6
18cd
18f6
191d
1945
196d
1995
19bd
19e6
1a0d
1a36
1a5e
1a85
1aad
1ad4
1afc
1b23
1b4c
1b73
1b9c
1bc4
1bec
1c14
1c3b
1c64
1c8c
1cb3
1cdb
1d03
1d2b
1d53
1d78
1d9c
1dbf
1de2
1e0a
1e32
1e5b
1e81
1ed4
1f01
1f31
1f5a
1f83
1faa
1fd1
1ff9
2022
204a
2071
2099
20c1
20e9
2111
2139
2160
2188
21b0
21d9
2200
2228
2250
2279
22a2
22ca
22f2
2318
2340
2366
238b
23b4
23e0
2407
2430
2458
2480
24a8
24d0
24f7
251e
2546
256e
2596
25bd
25e2
260c
2635
265d
2685
26ac
26d4
26fd
2725
274d
2775
279d
27c4
27ed
2814
283c
2864
288d
28b4
28dd
2904
292d
2955
297c
29a3
29ca
29f3
2a1c
2a43
2a6b
2a91
2ab9
2ae2
2b0b
2b32
2b5c
2b82
2ba9
2bd0
2bfa
2c20
2c4a
2c72
2c9b
2cc1
2cea
2d10
2d38
2d61
2d8a
2db0
2dd9
2e00
2e29
2e50
2e78
2ea0
2ec8
2ef0
2f18
2f40
2f68
2f8f
2fb7
2fde
3007
3030
3058
307e
30a5
30cd
30f5
311d
3144
316c
3194
31bb
31e4
320d
3235
325d
3286
32ae
32d7
32fd
3323
334c
3373
339c
33c4
33ec
3416
343c
3463
348c
34b4
34dc
3504
352d
3554
357c
35a2
35ca
35f1
361b
3645
366a
3692
36ba
36e2
370a
3733
375a
3782
37ab
37d3
37f9
3820
3847
386e
3896
38c0
38e9
3912
393a
3963
398a
39b1
39db
3a02
3a2a
3a52
3a79
3aa2
3aca
3af2
3b1c
3b48
3b6c
3b91
3bb8
3be0
3c08
3c31
3c59
3c80
3ca8
3cd0
3cf8
3d1f
3d49
3d70
3d96
3dbe
3de5
3e0e
3e36
3e5e
3e86
3eae
3ed6
3efe
3f26
3f4e
3f76
3f9f
3fc7
3fee
4015
403d
4065
408d
40b4
40dc
4104
412c
4154
417d
41a5
41cc
41f3
421b
4242
426b
4293
42bb
42e3
430b
4333
435a
4381
43aa
43d2
43f9
4422
444a
4472
449a
44c2
44ea
4512
4539
4562
458a
45b1
45d8
4601
4629
4654
467b
46a1
46c9
46f0
4718
4740
4768
4791
47ba
47e1
4808
482f
4857
487e
48a7
48d0
48f8
4920
4947
496e
4996
49be
49e6
4a0c
4a35
4a5d
4a84
4aac
4ad5
4afd
4b23
4b49
4b71
4b98
4bc0
4be6
4c0d
4c33
4c5d
4c82
4cad
4cd7
