00000000
fffffd71
96af6622
01010001
ff000000
00ff0000
80804000
aa55382a
1c2e0548
2bb81ec8
569d341e
806c3600
125105b2
dcc9ac7c
bee3a88a
89120992
0eba09fc
eea3978a
c2d8a3b0
545a1d68
787636f0
0c5a03f8
a65838f0
45b83178
5de45274
d4ba99e8
b5b9827d
e45248c8
ccecbc10
7ffa7b5e
8eff8d72
b5e8a3e8
ecb3a504
e9f9e1f9
71a648e6
55892d7d
f59e967e
9bd07df0
9f6a417e
fabbb67e
26ae197c
04610184
361e057c
198b0d8b
743617f8
458824a8
7d6b344f
1ed818f0
101d01d0
b9b884f8
587f2b88
0c2a01f8
3a220774
0c1400f0
0abf06fe
82412102
505e1d60
00c50000
167e0a7c
4d12055a
02b00160
39922072
acfaa778
0f9d0933
e5171483
87cd6c0b
4ef249bc
732f150d
a13420b4
0ce50abc
41c932c9
f9a7a2af
49ae317e
84864518
d6090776
471d07ab
81110891
43521576
57311097
e8766af0
107e07e0
77e369c5
25801280
29741274
b8835e28
d88e77b0
024d009a
12c40dc8
d15242f2
382c09a0
7b3418bc
330a01fe
5d762a9e
356f1693
0ced0b1c
e89e8ef0
c26c51d8
6bde5c2a
d90a087a
1ad6157c
5c301140
f5bbb2ff
093c01fc
bb946bfc
be9d749e
09d3075b
33350a3f
9c653d8c
08e70738
1ed2187c
f8ede578
6a250eea
02910122
0cbe0908
9c2717a4
70fb6e10
623b1676
bfc894f8
ed4741ab
b0ca8ae0
3e821f7c
3e3e0edc
29ab1afb
c86c5460
350c027c
f0161460
fe949278
b7eaa6fe
48bf3578
89f783ff
f4d6cb78
fb979445
ca765cfc
50fa4e20
84da7068
2b31083b
24b61958
5a4b1a1e
d5221c2a
2c130304
41972657
c7765ba2
a8e09300
58923230
394f118f
d8312958
a87f52f8
83562c02
50ec49c0
78ce6070
b74a347e
eee1d0ee
0fc40b7c
5cc947fc
1bf719a5
8ccf7164
81d36a53
f1b8ad38
a9291ae9
73602b20
cec39cea
05a00320
edeedc0e
5a3010e0
08ce0670
6ec5547e
6e3315ca
c7664f42
8c623598
fa4643fc
04de0378
f6817bf6
58ef5208
68250ee8
b30100b3
f8211ff8
f8aba5a8
eb887cd8
eb0e0c8a
28b11ba8
58cf4708
8245230a
1b5308c1
ffc3c28d
ed968a9e
4f050183
90ef8670
00bb0000
11c30cf3
e2685bd0
9dff9cd3
44f7415c
9a27170e
84a05280
9baa667e
9fc97c7f
2f6b1315
c84c3b60
2d9d1b81
1477090c
ea766b7c
8e1f1132
39390c79
c2ba8cf4
6da34547
b6271b92
abea9bfe
b9553cfd
fee2dffc
95ec88fc
44e23c08
6e8b3b8a
a75134b7
32791772
f0615af0
bf5e45f2
b6473252
45772003
89c16749
ccaf8b64
8fa45b7c
cc95767c
25bc1afc
9dca7b7a
f759559f
84b55d54
e1f4d674
2c5f1024
a1c279c2
410e038e
35b324ff
55b73c23
27df21b9
04a40290
79c75e0f
91f087f0
4db836f8
a1674067
ff303010
48681d40
a9805480
48d73c78
b8805c00
2daf1e73
607e2f40
7a170b2e
acbe7f88
1f49087f
5a200b40
dce3c324
8b432461
a43b256c
adca87fa
741b0c7c
c8f2bd10
faa29df4
2efd2d3e
cde8b968
56d2466c
c5e7b183
173704e9
e7413a67
3c59147c
27c91e7f
9cea8e78
04810204
36b325c2
70582680
0c4b0384
da2f279e
acee9fc8
19f317bb
7b210f7b
f6474452
0f460412
1e180270
66030132
ac7a5178
47be34f2
fb000000
433b0f51
7e371b52
ee6c6458
1b6e0b4a
c2ac8258
c95340db
354d0f91
6b582488
c1674d67
98ae6730
dc493e7c
da423834
cba07ee0
99321db2
33f23036
8b914ebb
fa8f8b9e
75d76263
46350e7e
0f6705f9
6c6329c4
c8140fa0
460c0338
86f37f32
18720ab0
49a02da0
1364076c
37470f19
5f2f1151
ed958981
6a502120
a68d5b3e
22d31be6
d4110dd4
e9988a58
3e8b21aa
086d0368
d6aa8dfc
85c867e8
66dc5778
415715d7
e5e8cf68
b1c48744
f2827ae4
61f35bf3
e36256e6
f0aca140
9e2415f8
57bd3feb
f17169f1
419d27dd
6a993efa
320600ec
0e65057e
a01d1220
a3835369
afe199af
24d61dd8
f0090870
904325b0
6c4d203c
53c03e40
21e41d64
8e2a16fc
fdf5f1a1
794d23fd
997444f4
67ab4485
c8d0a280
786d32f8
1f851013
7f462212
c8dfadf8
3de936fd
c8ca9dd0
f3c2b7e6
916e3dee
7b7236b6
1c2e0548
011b001b
c6dca9f8
cd765e5e
8b331ba1
bab88570
fc2322c4
eb7167bb
8f0c06a4
0ff50e43
1542056a
48691d48
a47b4e6c
184a06f0
97341e9c
2c450bbc
df473d39
119e0a7e
89f28172
18b510f8
ae31212e
b8362670
b2ba80f4
8df48634
904c2ac0
0d16011e
aede969c
04b202c8
192703af
dedbbd4a
d67a65bc
5d531e27
170800b8
b45c4070
960a05bc
147e0978
70ce59e0
20b81700
38220770
7c7739a4
613413b4
03cf026d
288f15f8
711a0b7a
cedaaefc
404f13c0
da423834
ebbeadea
1b5d09af
e1dfc3ff
e45349ec
fd413ffd
b34a337e
0b800580
5f4d1cb3
d3806980
e2f0d3e0
ed6058e0
d8debb30
89703bf0
b4100b40
ca0e0afc
da9a82f4
0cf40b70
858a47aa
7eee751c
e9baa8fa
ec7e7408
51eb49fb
93b96a5b
d6382eb0
7dc6600e
3bdd32af
ece8d5e0
2ec723b2
e7b9a6cf
b2543a68
4b7722c5
59d14859
e6ffe4c2
58d04780
87a05460
cf997b0f
87a05460
05cd0401
14690834
e8332e38
3a0500fa
b9a576fd
a2cf82fe
5ba63a82
29f526fd
cd785ff8
e3302a90
09b00630
0f9b08b5
fc474624
1a040068
a8cf8778
f40201e8
f66863f0
72a74a5e
54aa37a8
9bc878d8
f8eee670
8f2b1795
6dbb4f0f
7bb9585b
be5c4478
7b7337c1
6bef6395
79cb5feb
88683740
52000000
cff2c39e
b95c427c
655d2481
f8030328
446b1c6c
6f000000
2ae925fa
645e2478
8bca6d5e
0b05002f
b83b2a28
9c120af8
baf1aefa
c23e2efc
26ec22f8
5a49195a
e8201d00
884b27d8
f7262402
959254fa
0d6a04fa
27d52043
405f17c0
9ded9191
651407d4
aceb9d84
1f4e09b2
74b3515c
9d37214b
614f1def
710e05ee
a53c267c
8b351cbf
be241a78
45b32fff
43d83888
649e3d78
0a080050
ae4c3398
25180378
46fc44b8
d5b797a3
f6979112
98201300
4d3a10fa
032e008a
49b43334
4f992e8f
422d0b5a
75753519
ab2e1e0a
5fdf52f1
6bd25776
13ab0c81
dbfed96a
b05e4060
3c15048c
40c13040
4ad73dfe
72893cf2
3f2c0b04
5a6522fa
25a01720
42791ef2
79e96d79
cfe9bbff
36a021c0
76180af0
b03624e0
c90906c9
3b841e6c
b47b567c
acd890e0
74160978
47551783
4257166e
c84d3be8
35991f7d
daedc97a
033800c8
d8000000
31100310
61de53de
00620000
c2a07940
4f591b0f
898848c8
83773d25
9e9e619c
d5ffd3a3
f7c5bd93
96c975b6
58d74988
96eb8982
d9a48ae4
24040090
82d36b26
eb2d288f
f08e84e0
506f2270
bd36271e
716c2f6c
dd403740
61c74b67
53240b6c
9de98e7d
482f0cf8
bf5f4671
701508f0
df100df0
c89a7850
775225fe
cc7159cc
66752e7e
828e481c
86512a66
0dcc0a5c
1a1c02b8
fb636131
a5955ff9
17ef1539
ab5e3e2a
e4181560
6abc4d78
83e37429
87804380
18a40f60
05d50419
