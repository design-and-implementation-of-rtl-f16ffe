00000000
ffffdcf1
96af66a2
01010001
ff000000
00ff0000
80804000
aa553a2a
44200880
823c1e78
fde6d88e
f1c2ae62
6b301010
f90e0f7e
c7ddacab
01e400e4
88754228
34a220e8
0f0b0095
0d040034
c36e474a
d80e0d30
71e062e0
fd777acb
b0764be0
70eb6390
940b05bc
d53326ff
5f9736d9
3daa2e7a
d86141d8
9b91523b
ffc9b7ff
11f50ff5
7cce57c8
d45840e0
bbbf7075
2ce02680
37531145
c9bd927d
fa0f101e
f0160de0
9dc9767d
57561b82
740601f8
66761afc
cfb09310
b4eb96bc
89020112
c4423488
69da5a5a
1cf61b88
ba66467c
d3f8c8c8
b6d48678
b1000000
a9ea84fa
0e7506be
5a5c19b8
2e82175c
10240240
2a080150
e7070749
8f7f40f1
89381df8
5eb03ba0
9423143c
55511955
82562bac
8b9650c2
e8a484a0
fef2c8fc
3a0c0338
9fc57713
afd779b9
60843180
37811bb7
6bdd5caf
0a7303fe
09cb06db
4a120634
52e440c8
da705ce0
e67262ec
0fca067e
a4da7c68
1e981270
406c1b00
189c0da0
2427067c
9e985670
51d53dd5
81422142
0413004c
6feb6c95
57130605
c1663ce6
b1322172
69dd5a7d
63fc58e4
35c72113
97ff8579
08a60530
cd9072d0
095002d0
66a74202
45ad3201
db6d4e8f
88311a08
c2b08560
f8787040
21140294
2b440c6c
5655190e
6d8939ed
aa825854
bcad6bcc
ae3a1ffc
95784338
fa45427a
35a42274
14d01040
25c21bca
4b4012c0
ae3a1ffc
c1271e67
72290ff2
88ba64d0
973a214e
ea8d80fa
37170429
97060382
072e0112
d33a2c4e
14600780
7ad75e2e
523b0ff6
e6553a7e
7b5121fb
34de1f78
c1966e16
81f47af4
a1331ff3
6aa241d4
140d0104
059702e3
a3e68072
c8a07d00
cc201980
20a21440
e9393279
806e3700
f0b69de0
845d2ff4
6a9d467a
657e1b7e
b82918f8
8f2d1913
e52e267e
ad744734
c79d8eab
15a71113
5fa2327e
9b7d46ef
ab3322c1
2f7d10f3
700a03e0
7ccd57cc
258913ad
24260658
0b05002f
94b7628c
fcf0c740
4e330f0a
a7271889
585b1a88
4c481960
a39c6264
369624fc
40691a40
48100480
a1693de9
5b99369b
dd504110
187e0db0
81201020
e4dcc4f0
80e07000
e80503e8
caad88fa
57842cdc
f80c0b20
d50906fd
1fb51463
46401180
46842418
8dcb7a8f
cd584278
2d770fab
f80303a8
5aa22ff4
e0735f20
7aa04340
fdf5cda1
73d34ff9
ac8c6990
70180480
24bc1a70
51681ee8
9f985688
99be65be
54ed4684
2b3f0af5
c15a3bda
4f802780
da6f481e
1afd1dfa
c9b29632
c4544050
142e0478
823319e6
882a1850
47290aff
e37b60d1
c3ddac27
cb5441fc
a6e07fc0
40f93e40
6c3d0ffc
dcd1aa5c
3c972324
8e7f4072
c1020182
61e054e0
0a0f007e
7c85400c
695821d8
914b25fb
668b3d42
9f804f80
e45635d8
b6fbb242
d73e2f72
6ac45228
689142e8
370c0284
3c060108
97452893
26bf1f02
9fdf78f1
b6a5628e
003f0000
e2e6a64c
b39c6024
ccad8a9c
fc392efc
c1c392c3
68010068
8e65387e
ecd1c86c
9c5736a4
e6655a7e
b80100b8
c7daa44e
cfac8904
22fc2278
7e944e78
0ad007a0
4fcb3715
8a5b307e
250500b9
b2875c9e
d29b8bf6
4dec41fc
84f87fe0
56ef46a2
178a0c3e
32d81e30
23b518bf
22e21dc4
0a5402a8
522f0bfe
cd8d70a1
9b6a3f7e
6a791cfa
aa8964fa
232604f2
bcef9bc4
195607f6
988a51f0
b6764efc
c8cc9f60
58f74e88
84a856a0
71843a44
7d0f03d3
cea2825c
dd7f6ad3
896133e9
25540c14
e34b4001
86eb7a82
53461672
46e13bc6
b89e67f0
cd7b638f
3b69177b
9c2214b8
36742ef8
cba480ec
fc333204
5f1706d9
1c0b0124
6e1106ee
fde2ca7a
af8c6ea4
3c581060
30712930
cc7768a4
fde6d88e
c1563cd6
76781eb0
91ec806c
c76c4544
e7847e1c
a9feae7e
386d1338
28170478
0702000e
f5a383bf
c4936e4c
64cc54b0
514d17dd
0f070079
c64a3a3c
1dc215fa
82422184
28ec24e0
9b070415
121f01fe
4215056a
8c3c1ed0
dd2e25ce
610e03ce
ff42427e
8e6235dc
e5c7b003
a88961e8
857c403c
7d1e081e
59b336bb
db1f3075
b4d384dc
66d954f6
23881498
25801280
5a3110fa
4d1e091e
68db59f8
161b0202
2ef02aa0
bd32237a
a0140a80
40100400
e2413a62
cae4a4e8
0c8a0678
2e801700
a62b1682
9a110a3a
c41d29f4
85a052a0
4285244a
c23b2a76
9b301d10
d97d65fd
69a944e9
adc888e8
f6352d0e
42e53cca
0f950803
50661fe0
bdc78b2b
a63120a6
d1b08fb0
40210840
16990cf6
a0d572a0
98a36108
b48b5fbc
a6040298
3e4c0f98
a2a658cc
a7231675
e78f7fd9
f5e8ce68
bac284f4
281c0460
44180660
fb807d80
7dad4bd1
b9bd6fbd
ce9d92fe
edae8ace
550e03fe
4b802580
71441dc4
395e0ffe
d2190bf2
32881c90
36680e70
852211aa
282505a8
6f582588
dd0b072f
bcf9b6fc
91703f70
66fc5eb8
78d95878
e7bba455
60f657c0
258312ef
d0673e70
04c20308
f927202f
ced9a07e
14b411d0
ea03033e
619937f9
023d007a
9aa15fda
90d26d20
d19d825d
e79a868e
43e33b69
47531785
81040204
d9120e32
bcd78b24
cd9072d0
092e017e
2e02005c
c48968e4
ed8b8c0f
bef6b50c
acc68108
e93b2ffb
f7b5a763
4ad444a8
4b09025b
58852d78
bc412fbc
93d36ff9
84934bcc
d78c6e84
ddab8ccf
f86e5f70
fbcdd38f
d92e253e
20420840
694c21ec
750d0291
34811a34
4ff54843
32cc1fd8
5f01005f
2dda217a
1a6f0a1e
d8b19658
183404e0
d63c2cf8
878e4cd2
5bf54cbf
186d0938
2cc71e24
3fe53593
96fe86fc
c93b2bfb
f5362e7e
4cc5387c
67552383
83d56aff
93fc80e4
6dac4ebc
f8342e60
04b102c4
881c0ee0
e1997c79
33752bbf
8c8a5378
7ed25a7c
4b421456
83633329
d01d29d0
4cd34664
8a8f54fe
f59c86fc
88fb8658
6dff6c73
bcf0af40
7bad440f
5a5c19b8
e64c4638
1da6120e
456d1d01
a1fc987c
f5a88228
3c410f3c
47832455
732d0e87
19580858
3b732dc1
669d3cfe
d8a77f88
020a0014
9c703f40
2b721296
8fae6d32
89c267d2
0b3e026a
a8b16428
473a114e
80492480
15b111f5
272f0699
34991ef4
a27f487e
89190e59
b90f080f
28470af8
ccbe8f08
7b302510
a88c63e0
04a40290
39b42274
408a2280
cf2e2732
f3d6c002
c99a705a
709a3ce0
441b06ec
38591078
7b6e248a
de8c7198
0a800500
8a86483c
f2403c80
ce3527fe
bf231b0d
b90f080f
9de488f4
434f146d
26480cb0
6ef76bf2
abba655e
95513115
4fc336ed
e1cfc7ef
3c4a10f8
8a97523e
04040010
43c232c6
33eb2c41
0fdd0773
d88d6d78
bdd18b3d
cfeca844
1b320536
f1130f93
00150000
38470f08
b68a60fc
b6f2acec
7d7a237a
36b71e52
513b0ffb
14a01080
d8b19658
811c0e1c
ded4a8f8
c0b78640
96ae667c
e1795ff9
491c07fc
ae3a1ffc
58f94e58
ae3e20dc
0bf507bf
6bc44fec
59cb4a8b
743321dc
7fab4e55
a87d4e68
ecf1baec
bdfcbc3c
63dd5027
e1ccc24c
3df9397d
88402200
4c0601c8
