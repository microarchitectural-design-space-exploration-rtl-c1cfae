0a5c11410793
1e5433410693
04d024410613
14d426410693
01880c010513
1a4413410493
11240a810493
0bb01d810613
12a416810493
1d1c2b010793
103c02810793
013008810613
02c014410413
0d6029c10413
023c10810793
02e414c10493
11a00e810413
01e40cc10493
1a7413c10693
121812010713
1e5033410613
072438810493
141022010613
12a416810493
01f80cc10713
127412c10693
0cb025810613
01940c010693
071038010613
017c08c10793
1b781bc10713
044020410413
0d6829c10513
049c24010793
03c41c410493
124412410493
11ec0ec10593
1a1c13010793
15d02e410613
034c18410593
129c16010793
5c0003842403
5a2c07062583
4ae00546a403
563c06862783
530402072483
4fe405c7a483
59800305a403
4e980186a703
5ae00746a403
42fc0446a783
48a00504a403
4f2805872503
554002c52403
421400062683
41f00445a603
567006c62603
49e80545a503
527c06462783
5fc403c7a483
5a4c03462583
4e4001c62403
56ec06c6a583
4c5801c42703
556406c52483
4b1801072703
5e1803862703
4ec401c6a483
456004c52403
538c0207a583
4fcc01c7a583
41e00445a403
58940304a683
493005052603
442004842403
47ec04c7a583
4cb80584a703
5d5403c52683
5be00747a403
42940006a683
455000c52603
4cd801c4a703
71940205b683
7c440b843483
64600c843403
6dc40985b483
7ba40707b483
68e80d04b503
76980286b703
7f900387b603
6b780d073703
75d80a85b703
6c2c05843583
7ea40786b483
64d40884b683
62a40406b483
64d40884b683
676c0c873583
67740c873683
60600c043403
7a980306b703
72d80a06b703
68680d043503
690401053483
64a80484b503
6d680d853503
6bd00907b603
73800207b403
6a3005063603
7e7c0f863783
640400843483
7b7c0f073783
707c0e043783
73c00a07b403
74f40e84b683
77ac0687b583
61b80405b703
7cc80b84b503
7bdc0b07b783
7e740f863683
7bfc0f07b783
79880305b503
71e40e05b483
d94802a52a23
c8f004c4aa23
c84800a42a23
c63004c62423
d62806a62423
de9802e6ac23
cb0400972823
d9dc02f5aa23
ddfc06f5ae23
df9c02f7ac23
cb2c04b72823
df2c06b72c23
cba804a7a823
c70c00b72423
c34400972223
cf0800a72c23
c64800a62623
c68800a6a423
cf7004c72e23
df840297ac23
dccc02b4ae23
dae40696aa23
c00c00b42023
cf5400d72e23
d4e40694a623
cb0000872823
d49402d4a423
c2b404d6a023
d52006852423
c3d400d7a223
cc6c04b42e23
d90802a52823
d80002842823
c66004862623
dc7006c42e23
c5b404d5a423
d94002852a23
d45802e42623
c2c40096a223
d9a00685a823
de4402962e23
f71802e73423
eca804a4bc23
ecd808e4bc23
f7c80aa7b423
e2b404d6b023
f73006c73423
e5700cc53423
ffc40a97bc23
e0e00c84b023
e4d408d4b423
fcf40ed4bc23
eee40c96bc23
f4fc0ef4b423
e4ac04b4b423
fa700ec63823
f31002c73023
ef2c04b73c23
f50802a53423
fdfc0ef5bc23
e4fc0cf4b423
f18c02b5b023
e43004c43423
e0ac04b4b023
f99402d5b823
ff1002c73c23
f4c80aa4b423
e34808a73023
f7f80ee7b423
fde00e85bc23
ede00c85bc23
ff9002c7bc23
e63804e63423
fa6c0eb63823
e6c00886b423
e0e40c94b023
e6cc08b6b423
e95c08f53823
f00802a43023
f8700ec43823
f2c40a96b023
084d01380813
1169ffa10113
1ab1feca8a93
043100c40413
1d1dfe7d0d13
17adfeb78793
1cb9feec8c93
0ea900ae8e93
12a9fea28293
1a15fe5a0a13
1089fe208093
0d7501dd0d13
1d5dff7d0d13
1c19fe6c0c13
042d00b40413
04d901648493
10c1ff008093
1bedffbb8b93
0e15005e0e13
05dd01758593
1379ffe30313
1991fe498993
04c901248493
048500148493
0f25009f0f13
1735fed70713
03d901638393
01f901e18193
0a6d01ba0a13
1095fe508093
10f9ffe08093
0f7101cf0f13
1919fe690913
18d9ff688893
1c41ff0c0c13
11edffb18193
07f101c78793
061d00760613
015901610113
38b5fed8889b
2e7901ee0e1b
31f9ffe1819b
3851ff48081b
3c99fe6c8c9b
22050012021b
2e2d00be0e1b
3399fe63839b
3f25fe9f0f1b
26610186061b
3629fea6061b
28dd0178889b
3111fe41011b
39d5ff59899b
3e21fe8e0e1b
27ed01b7879b
30bdfef0809b
3c0dfe3c0c1b
3e25fe9e0e1b
3db1fecd8d9b
3d85fe1d8d9b
31e5ff91819b
3e2dfebe0e1b
267901e6061b
2e51014e0e1b
24610184041b
23e50193839b
2c8d003c8c9b
2a1d007a0a1b
22510142021b
3579ffe5051b
2db500dd8d9b
22550152021b
356dffb5051b
29b100c9899b
23e901a3839b
3cb5fedc8c9b
44f101c00493
5e11fe400e13
5495fe500493
5521fe800513
449100400493
481900600813
446501900413
5ef5ffd00e93
470500100713
57e5ff900793
5e79ffe00e13
4cbd00f00c93
5c51ff400c13
453500d00513
5fadfeb00f93
5aa1fe800a93
472900a00713
5699fe600693
4dcd01300d93
4ced01b00c93
4ad901600a93
464101000613
4b6901a00b13
42f101c00293
5719fe600713
409d00700093
4ad101400a93
4ead00b00e93
4e1900600e13
5681fe000693
4c4d01300c13
4a9900600a93
53f5ffd00393
497501d00913
420d00300213
439d00700393
5d65ff900d13
5939fee00913
5f19fe600f13
5c09fe200c13
62b10000c2b7
687d0001f837
614503010113
7cfdfffffcb7
65cd000135b7
68a5000098b7
782dfffeb837
7a39fffeea37
7b2dfffebb37
75a1fffe85b7
7a35fffeda37
684500011837
6cfd0001fcb7
7129ec010113
7d69ffffad37
6fd100014fb7
7669ffffa637
62dd000172b7
68ed0001b8b7
7995fffe59b7
7605fffe1637
6d9d00007db7
7ca5fffe9cb7
6899000068b7
7e05fffe1e37
6089000020b7
62d5000152b7
79a5fffe99b7
62ad0000b2b7
7375ffffd337
671d00007737
622100008237
7b99fffe6bb7
63e5000193b7
6ad900016ab7
7fd1ffff4fb7
6d5d00017d37
7da5fffe9db7
88910044f493
93e50397d793
816101855513
90dd0374d493
96b542d6d693
9e054096063b
9f014087073b
886101847413
819d0075d593
867541d65613
89f901e5f593
89c10105f593
90fd03f4d493
86954056d693
894501157513
900102045413
95814205d593
88a900a4f493
8b1900677713
80950054d493
880100047413
807d01f45413
80950054d493
977543d75713
91a10285d593
861140465613
8f3100c74733
87dd4177d793
836501975713
951142455513
94cd4334d493
8dd500d5e5b3
8fd500d7e7b3
917903e55513
8c9540d484b3
9f0d40b7073b
89d90165f593
b601b01ff06f
bf71f9dff06f
a7597860006f
a6593860006f
baa1959ff06f
bc39a1fff06f
b751f85ff06f
b459a87ff06f
acf12dc0006f
bfa9f5bff06f
bf69f9bff06f
a1bd46e0006f
a4252280006f
a0750ac0006f
b401a01ff06f
b7b5f6dff06f
a82d03a0006f
adc96d20006f
a1c54e00006f
a2b516c0006f
bae99dbff06f
ac3121c0006f
bbd9dd7ff06f
b575eadff06f
bf11f15ff06f
b329d0bff06f
a7c17c00006f
a9614980006f
a17148c0006f
a5ed6ea0006f
a5096020006f
ae453b00006f
a01d0260006f
aba55780006f
bec5bf1ff06f
bf1df37ff06f
bf85f71ff06f
aa591960006f
a7d17c40006f
bee5bf9ff06f
bc3da3fff06f
c9e50e058863
cb690c070963
c5d908058763
cab904068b63
cc3506040e63
cf3104070e63
c8ed0e048963
d4fdfe0487e3
c66d0e060563
d025f60400e3
d8d5fa048ae3
c2e90c068163
c8750e040a63
c2dd0a068363
c49900048763
d2c5fa0680e3
c1550a050263
cc9900048f63
c99502058a63
c9bd06058b63
c7710c070663
c2b506068263
dea5f6068ce3
d0edfe0481e3
d805f20408e3
c4f50e048663
dc91f0048ee3
d6e9fc0685e3
dc21f4040ce3
d315f20702e3
d875fe040ae3
ca6d0e060963
df81f0078ce3
cfd108078e63
c91502050a63
d72df60705e3
d3cdfa0781e3
c4a104048463
c1650e050063
dab9f4068be3
d6e1fc0684e3
f069fc0411e3
f411f00416e3
f779fc0717e3
f66dfe0615e3
f02df60411e3
e4750e041663
f0c1f80490e3
f815f2041ae3
f231f40612e3
fab5f6069ae3
f9bdf6059be3
e08100049063
fa71fc061ae3
f2b1f40692e3
f989f00599e3
f6c1f80694e3
f5d9f80597e3
f62df60615e3
f491f00496e3
e2b904069363
e0fd0e049363
e44108041463
f461fc0414e3
feb5f6069ee3
e35908071363
fabdf6069be3
ee710c061e63
e19d02059363
f415f20416e3
f409f00415e3
f101f00510e3
f5c9f80595e3
efa904079d63
e8710c041a63
ee9d02069f63
f985f20598e3
f7f1fc0796e3
fdd5fa059ee3
fcb9f4049fe3
f121f40510e3
151a02651513
10d603509093
17de03779793
179202479793
081200481813
19e603999993
1b12024b1b13
087e01f81813
175603571713
069200469693
076201871713
14ce03349493
1f3a02ef1f13
0fce013f9f93
1b0e023b1b13
027601d21213
0f56015f1f13
15e203859593
093200c91913
017e01f11113
13be02f39393
149202449493
065a01661613
133202c31313
04b600d49493
082200881813
14da03649493
17ca03279793
09be00f99993
13e203839393
044601141413
0f6e01bf1f13
0f8a002f9f93
089a00689893
158202059593
032e00b31313
06f601d69693
159e02759593
094e01391913
16ae02b69693
4fba08c12f83
55ce0f012583
4cfa09c12c83
49aa08812983
574607012703
4d5201412d03
4b0200012b03
4a1e0c412a03
43de0d412383
4a9a08412a83
4a6201812a03
4ad201412a83
5ada0b412a83
43d605412383
5e1202412e03
464201012603
56d203412683
57ae0e812783
494605012903
4bea09812b83
421604412203
4c7e0dc12c03
5ff607c12f83
5bd607412b83
427201c12203
4b8a08012b83
4db200c12d83
582e0e812803
5b5607412b03
418a08012183
434201012303
41a604812183
552e0e812503
492200812903
5df203c12d83
44c201012483
5f1202412f03
488200012883
6a1a18013a03
661210013603
6bf211813b83
791e1e013903
7e9a1a013e83
7c4a0b013c03
60ee0d813083
785e1f013803
743212813403
7d3a1a813d03
7c0606013c03
71ba1a813183
719212013183
770606013703
629614013283
7dde1f013d83
776e0f813703
6e6e0d813e03
73ae0e813383
646e0d813403
749e1e013483
7bd213013b83
6f8a08013f83
619210013183
7daa0a813d83
719a1a013183
657615813503
6f1e1c013f03
6afe1d813a83
690604013903
682e0c813803
77a606813783
7f3e1e813f03
74e203813483
6cfe1d813c83
74fe1f813483
69a200813983
6f7615813f03
756607813503
6c9e1c013c83
63d615013383
9496005484b3
852e00b00533
86a6009006b3
9cfe01fc8cb3
8fea01a00fb3
919e007181b3
8e7e01f00e33
9d02000d00e7
9fe2018f8fb3
984a01280833
8dae00b00db3
847601d00433
862a00a00633
87ce013007b3
8596005005b3
8af201c00ab3
91ca012181b3
8a3600d00a33
87a6009007b3
884601100833
99e6019989b3
867601d00633
9c66019c0c33
97fe01f787b3
9bde017b8bb3
8c4201000c33
8d3e00f00d33
90c6011080b3
86ba00e006b3
88a6009008b3
8ad201400ab3
81fe01f001b3
8ff201c00fb3
926201820233
9ef601de8eb3
8b8600100bb3
95fa01e585b3
90ee01b080b3
994a01290933
cea204812e23
d1a60e912023
d8de07712823
c00a00212023
d90a0a212823
c77209c12623
d23a02e12223
c13208c12023
d4a606912423
c9ba0ce12823
dece07312e23
d40e02312423
c80e00312823
d0e607912023
cdfe0df12c23
d65a03612623
c3960c512223
c32e08b12223
c99e0c712823
d0ca07212023
d2a606912223
c62200812623
c85a01612823
c72608912623
d33a0ae12223
c00a00212023
d1320ac12023
c9a60c912823
cebe04f12e23
c8ea05a12823
ca1e00712a23
d4a206812423
dade07712a23
c7c20d012623
cf3608d12e23
c7820c012623
d1820e012023
c0ee05b12023
debe06f12e23
d68e06312623
d4ca07212423
e1c60d113023
e0b204c13023
eff21dc13c23
fc5203413c23
f4b606d13423
ed7209c13c23
e83a00e13823
e74a19213423
f55a0b613423
fd9a0e613c23
ebda1d613823
efc61d113c23
e11608513023
ead215413823
f6fe17f13423
eb9a1c613823
f5d60f513423
e65611513423
e03600d13023
e95a09613823
f7a61e913423
f02602913023
e22a10a13023
efde1d713c23
ff0a1a213c23
e9fa0de13823
f88206013823
fa3e12f13823
e76219813423
eee215813c23
e87a01e13823
f85603513823
e97209c13823
e37e19f13023
f3f61fd13023
efde1d713c23
e5fe0df13423
fcae06b13c23
ef861c113c23
ed5a09613c23
000100000013
808200008067
1141ff010113
e40600113423
