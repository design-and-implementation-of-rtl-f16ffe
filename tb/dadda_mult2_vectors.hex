00000000
ffffccf1
96af63a2
01010001
ff000000
00ff0000
80804000
aa552d2a
79421ef2
bdf2907a
210600c6
f0847bc0
77622cee
f0f3bdd0
cb4d388f
764d221e
c7070369
20510a20
159a0c7a
0f8907ff
f2c6b86c
dacaa774
e3443c4c
bb311fbb
124504da
fd6f5213
84df72fc
9ad777ae
c5b387ff
d07657e0
ac0e0828
8f532dcd
a7352003
6c883960
913f1fff
20f61ec0
f72d20ab
b0221760
d24d365a
0a9605bc
dad4a6e8
3c160488
17c10f57
a98e5c7e
78120870
9e0301da
27370849
10650650
d0956fd0
864f2942
15ad0d91
a0b85f00
46c132c6
c0eb9f40
c53427f4
8adc75f8
799a437a
df8472fc
9bad640f
05d40414
a10a054a
c0443300
1eaa137c
eeb49fb8
b48e6178
fa0b083e
1f0a00fe
bd805e80
e99887d8
a35a300e
ba5e33fc
a0bd5fa0
8799508f
c13527f5
0d430367
9e7144be
897a40fa
a75f3239
de3129fe
34a42150
aa7242f4
e0563ec0
28ac1ae0
6fe65b12
8a733d7e
3d1103fd
61a13ce1
5d8e330e
ae2b178a
b0422d60
d79573a3
8aed7f7a
b1d59075
94d67278
d1120db2
d34f388d
660200cc
f4debbf8
71100710
e99383bb
ae7444b8
22921364
3d7d15a1
17110177
65dc53bc
19060076
f63d311e
5799339f
7a0a03f4
d31b1421
3aae23fc
40812040
f41f188c
b4714f74
653e107e
3d5713eb
7a8c41b8
410300c3
f9ccbfec
198a0d7a
7f89437f
d81a1470
f2a580fa
001c0000
401705c0
3f19039f
23f720c5
102c02c0
faa182fa
50a12a50
24b318ec
c5c797e3
9bb864a8
876132a7
a8db8678
3f410fff
01c200c2
285b0df8
15bf0ea3
ebc2b1d6
16dc1078
1bbe116a
fea1877e
d7d6a282
eb0907fb
7d6f3113
8a241368
d9725b72
da423834
0ea6070c
bf866392
3eed321e
3fc02f40
37a32285
34020068
f2494072
78c75c48
162f03a2
32c02580
5b0c03c4
ae3e225c
0d3a017a
f69182f6
992d17bd
127a0874
36330642
1fa61312
5c270da4
7b5c2414
7fe85af8
c9816549
bccb8f54
b3d69202
2ac01f80
78d35ee8
52d43ee8
f74f42b9
cd4c38dc
53310f93
fef7ca12
e25f50be
458824a8
654b1cef
a1763ff6
97d37045
886f3af8
9d0b061f
89f5827d
c3663bb2
58b83540
7aa443e8
f749417f
d6f5c50e
69ef57ff
0ef607cc
25cc1d7c
17ef1539
757830b8
236f0f0d
827b3e76
61843204
465f1982
12820924
56170612
a05d2fa0
d82e1fb0
2b3c09d4
2f8718a9
9512097a
b6e790f2
ac030204
0fab0715
a9df867f
c2f8bbf0
276b0f85
fac8bf50
40a328c0
3d8c1fdc
27dd206b
39e031e0
80311880
bfbc6c44
e6978402
87361be2
ad3a217a
fcb4abf0
1e96110c
5d4c1adc
5bbd356f
e83f32f8
37480f78
a9d7827f
995f331f
eaf6b57c
9f5a321e
23360722
5cc847e0
b7331f65
888a4950
c41b136c
45150559
f58a826a
7eb5480e
aace877c
e5231daf
b4fe8df8
394d0ffd
8a331b7e
39390879
5e6022c0
d5c8a268
414a12ca
cb633e81
575b1a25
67803380
bd96629e
0fe3084d
d0c49f40
a19e605e
fe99947e
f70f0879
61010061
377710c9
fb585388
eb6543ef
636c20c4
12e30ff6
39911fb9
4e4514fe
ef2d2013
190d00bd
b87753c8
27ff2579
09ad05ed
a5a857a8
b0442ec0
291102b9
28af1af8
69200d20
66df5502
71f85778
a1371ff7
15d11115
27660f02
52c84010
fef2c6fc
22d81cb0
6afa5874
9b0b0621
edeac87a
cde09ee0
5ce9477c
138309b9
bbbd6d6f
e5b9a27d
cd72583a
016b006b
84bd6174
49eb427b
63511ef3
6b0b0401
57ce4412
560e03fc
47380f08
56e2436c
fb5e552a
1e0b012a
cee5a17e
a2d07ba0
101a01a0
7ace60fc
14cb0fbc
fc0d064c
707b2ed0
30c72510
f2614b72
54aa2d28
3bb1283b
3f1a039e
948c50f0
ee998b7e
fa7f603e
880f07f8
acb06540
a22f17fe
1dde189e
2d01002d
350f01d3
2e09017e
571205fe
f61b1402
60a93f60
66f454b8
aef588be
b3110bb3
c39c76d4
c92c1e6c
965e317c
d33a2c4e
c7ab8405
ce59467e
c5b78c03
5eb937fe
d4e0a180
75e356ff
f6b0a0a0
89562df6
c6f9bff6
154e05fe
570b0305
ef2f23b1
31a31f33
791c07bc
18e61570
eeaa887c
bd000000
24630dec
cc3529fc
ad9f6733
38e631f0
296b107b
7b180788
4e4915fe
053900fd
759342df
6a7021e0
d6a38002
60ef4fa0
5a280bd0
1539047d
0c330164
668233cc
2b3708c5
eeccb498
72370e7e
f8b1a778
cee4a0f8
38952078
e3c2abc6
693b11fb
03ed01c7
9927152f
aeb167ae
62f850f0
24ba19e8
d8221cb0
6d7f2473
b31f106d
ab7843a8
dce0a680
2b801580
6fa54483
54692074
6fed5ad3
d6bc93f8
61d14ef1
f7d0c3b0
f0110ff0
950904bd
5e3111fe
0e4d041e
961f1022
f1140fd4
636a20fe
8dfb890f
dd130e27
b0ef9010
649338ec
49340eb4
e399858b
d2e3a1f6
27690f3f
4ef947fe
91c06cc0
be5232fc
dc9f81a4
edf2b8fa
71b83f38
93924ab6
0fed0853
bfb76d79
987c43a0
05070023
434c13e4
0a5402a8
19000000
68ee56f0
b5b95f7d
11fa107a
5e7a24fc
068d033e
ddad8c51
1a3004e0
e69f8e02
867e40bc
ffd6cd22
85ad5941
160f0122
db130e41
547e2178
45d338df
ac442db0
8f080478
56170612
08f807c0
1eeb18aa
efd4b8bc
bd5733eb
965d319e
25470a03
34d02a40
b4e38f9c
e88e7ff0
82e7754e
904f27f0
a1472be7
13d20f76
f8766570
ea8b7dfe
0fa206fe
3bf9355b
408f23c0
89341bb4
de261c8c
be110c7e
f9e5cb7d
639f39dd
b15c2f5c
c4cb9b6c
a1190fb9
8a6d3a7a
13a20be6
a2c87e90
90120920
43d5377f
80d36980
28fd2768
75662d7e
283a08d0
3f02007e
902313b0
dc8974fc
f7ecce84
89944eb4
18590858
78f96478
56491876
4c5b1a84
efcbba15
04480120
c81b13d8
5c5a1b78
9f613bbf
424b1356
184d06b8
6dc34f07
36dd2a1e
c75d482b
0d8f0743
35430ddf
3a4a1074
974025c0
c4b489d0
27620e6e
03bd0237
48f444a0
7d200fa0
b5f888b8
35a020a0
f20a07f4
b0e28b60
d0ed9fd0
9ce287b8
4ce93eec
c4663c18
975b2fe5
9955327d
a2885610
67421a4e
1b1d02ef
d15b47fb
3a07014e
503e0fe0
cebf9572
8c2f19b4
ede1c76d
a64a2efc
6fa54483
e9bfaaff
a2b760ee
b0ae5f60
92984eb0
8a5d317a
3f71103f
ae7f4572
90de6fe0
88e77ab8
42f43ee8
ab5a321e
e21a13f4
23d51bff
d995747d
1e790cfe
c3c4954c
6c260f88
bb6d454f
1cfc17d0
3cdc2fd0
c7b98f4f
06990376
bebd6c1e
cce09e80
be35220e
fd4a42fa
a5704030
00bd0000
20000000
47290aff
6ba4446c
de9074e0
640f03bc
0ea006c0
e3baa1ae
6de156ed
ad3d2281
c1735573
f3474165
9d924ffa
613c0fbc
582b0c08
dc0e0708
b3c38859
03fa01ee
5ef24abc
8c4726d4
c7684038
dd988278
df92757e
312a07ea
20e21c40
a4211524
04a60298
f5d8bcb8
30a91fb0
d6735a02
a5674183
c82d1ee8
1a0d00ba
7a2b117e
5c762408
f0cab7e0
91b05bb0
e9746374
67983b08
af442e7c
bab5687a
a1683d68
e41e17f8
dd9f81b3
63fc5274
