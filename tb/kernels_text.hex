0011011b00004137
018000ef01111113
0012829b000082b7
00a2b02301029293
f60101130000006f
0001079707713023
00008bb70e878793
0007a783fffb8513
0000383741c658b7
00a13423ffffa5b7
0931302300010537
0751382307413c23
05a1342307613423
08813c2305b13023
0921342308913823
0591382305813c23
0000069300300313
0000061300000713
408b0b1300010b17
43fa8a9300010a97
060a0a1300010a17
0398081be6d8889b
01800d93fff50d13
0015859300800993
0001039702000f13
00010e1725438393
00000f9304ce0e13
0317853b00000e93
010e929b00813403
000e0f9301fe3023
001e8e9b010e0e13
0085579b0105053b
0107979b00f477b3
01a7f7b30107d79b
fefe2c230057e7b3
fdbe90e30005079b
00010e1700000293
00c0006f164e0e13
00050e13000e0293
005e3023000e3503
02013423fe0518e3
00ae302302810e93
0402846301ceb023
0002b40302813503
0205026302810e93
02810e9300829f83
00050e930100006f
0005066300053503
fffe48e300851e03
00ae302300028e13
01ceb02300040293
02813283fc0290e3
0006051306028663
00a2d60300829403
0104141b00000f93
0004041b00c46433
0ffe7e1301f45e3b
00ae463300800e93
40c0063b00167613
00c5f6330015551b
0306151300a64633
001e5e13fffe8e9b
fc0e9ce303055513
fdef92e3008f8f9b
fa0292e30002b283
00010f9700050613
00010e1708cf8f93
000f8513104e0e13
00250513031787bb
010787bb002e0e13
0087d79b03178ebb
f807879b0ff7f793
010e8ebbfef51f23
0ff7f793008ed79b
fefe1f23f9c7879b
fca392e3000e879b
1385051300010517
0000029300050413
00c13c2300f13823
0003861300068e93
0000079300040693
000e8e13010f8c13
000f8e9300060493
000e9c8300000913
01048493002e8e93
ff049c83000c8b93
012c893b039b8cbb
0126a023ffdc12e3
004686930017879b
fd3792e300260613
040007930082829b
02040413000e0e93
000c0f9300f28663
01013783f95ff06f
000e069301813603
00d0049300700913
0005270300070413
41f75e1b00000f93
41c7073b01c74733
0297673b032742bb
01f2de3b00e282bb
00800e930ffe7e13
00177713008e4733
00145c1b40e0073b
0184443300e5f433
fffe8e9b03041413
03045413001e5e13
008f8f9bfc0e9ce3
00450513fdef92e3
00040713f8ab1ee3
128e8e9300010e97
031787bb01100f93
010787bb001e8e93
03f5753b0087d51b
0205151300078e13
00aa053302055513
feae8fa300054503
00010517fdda9ae3
38054503d6c50513
100e8fa300010e97
0201382302013423
0605026302012c23
0c9f8f9300010f97
02c0029300000e93
00300c1300900913
02d0041304500493
0fe50c630e550e63
159e8c6300200c93
120e886311dcc863
0ffcfc93fd050c9b
0199786300100e93
00a03eb3fd250513
000fc503003e8e93
fc0512e3001f8f93
0006841302810493
00000f930004a283
0ff5751301f2d53b
008546b300800e93
40d006bb0016f693
00d5f6b30014541b
030694130086c6b3
00155513fffe8e9b
fc0e9ce303045413
fdef92e3008f8f9b
03c1069300448493
fff3031bfa9698e3
c2031ce300040693
0107171302061613
0085653300e66533
0001079709813403
01c7a023c6878793
0881390309013483
07813a0308013983
06813b0307013a83
05813c0306013b83
04813d0305013c83
0a01011304013d83
002e951300008067
02010e9302050513
fe852c8301d50533
001c8c9b00000e93
f19ff06fff952423
02950c63018e9e63
fd05051b04a4ea63
00900c930ff57513
00400e93eeacfee3
00200e93ef5ff06f
04a46263ee8506e3
00400e9302b00c93
00200e93ed951ee3
fd05051bed5ff06f
00100e930ff57513
00400e93eca972e3
06500c93ebdff06f
eb9518e300400e93
ea9ff06f00200e93
0ff57513fd05051b
00100e9300900c93
00400e93e8acfae3
00000000e8dff06f
