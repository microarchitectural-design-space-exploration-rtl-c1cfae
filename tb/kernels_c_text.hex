0146210500004137
228562a1010000ef
a00100a2b02302c2
00010797f0de7135
85136ba10f878793
41c658b7439cfffb
6541e42a75e9680d
f4daf8d6fcd2e14e
e926ed22e0eee4ea
430de8e6ece2e54a
0b17460147014681
0a97442b0b130001
0a17479a8a930001
889b09aa0a130001
0d130398081be6d8
058549a14de1fff5
0001039702000f13
00010e1729438393
4e814f8108ce0e13
929b64220317853b
8ff201fe3023010e
0105053b2e850e41
979b8fe10085579b
f7b30107d79b0107
2c230057e7b301a7
95e30005079bfefe
00010e174281fdbe
82f2a0191b4e0e13
3023000e35038e2a
0e93f402f975005e
b02300ae30230281
752202028c6301ce
02810e930002b403
0e9300829f83cd09
61088eaaa0210281
4be300851e03c509
00ae30238e16fffe
98e301ceb02382a2
04028a6372a2fc02
d603008294038532
0104141b4f8100a2
01f45e3b24018c51
46334ea10ffe7e13
40c0063b8a0500ae
8e298e6d0015551b
5e133efd03061513
fe0e91e39141001e
b283fdef99e32fa1
862afa029ce30002
110f8f9300010f97
188e0e1300010e17
0509031787bb857e
8ebb010787bb0e09
f7930087d79b0317
1f23f807879b0ff7
d79b010e8ebbfef5
879b0ff7f793008e
879bfefe1f23f9c7
0517fca394e3000e
842a1c2505130001
8eb6ec32e83e4281
8c13478186a2861e
8efe84b28e76010f
0e89000e9c834901
ff049c838be604c1
012c893b039b8cbb
0126a023ffdc15e3
9be3060906912785
0400079322a1fd37
8463020404138ef2
67c2bf558fe200f2
44b5491d86f26662
5e1b4f814118843a
073b01c7473341f7
673b032742bb41c7
de3b00e282bb0297
4ea10ffe7e1301f2
073b8b05008e4733
f43300145c1b40e0
14420184443300e5
9041001e5e133efd
98e32fa1fe0e90e3
faab17e30511fdef
8e9300010e978722
031787bb4fc51fee
d51b010787bb0e85
8e3e03f5753b0087
4503955291011502
9fe3feae8fa30005
051300010517fdda
0e9738054503e4e5
f402200e80a30001
0f97c929dc02f802
4e811b3f8f930001
4c0d492502c00293
02d0041304500493
0be507630a550963
c0630f9e8d634c89
0c9b0c0e8d630ddc
4e850ffcfc93fd05
fd25051301997763
c5030e8d00a03eb3
1024f5710f85000f
4f810004a2838436
0ff5751301f2d53b
8a85008546b34ea1
0014541b40d006bb
030694138ea18eed
92e3904181053efd
fdef9ae32fa1fe0e
fc9693e318740491
d00318e386a2337d
00e6653307421602
00010797646a8d41
01c7a023d8878793
7a66698a692a64ca
6c667b867b267ac6
610d6d866d266cc6
0513002e95138082
957602010e930205
2c854e81fe852c83
9d63b78dff952423
e06302950763018e
7513fd05051b04a4
f4acf5e34ca50ff5
00e34e89b7914e91
0c9302a46963f485
f39519e34e9102b0
fd05051bb7354e89
70e34e850ff57513
0c93bf294e91f2a9
f19519e34e910650
fd05051bb7314e89
4e854ca50ff57513
bde54e91eeacffe3
