80010137
00001297
82828293
00003317
06c30313
0062f863
0002a023
00428293
ff5ff06f
34c000ef
0000006f
800017b7
82d7c703
04100793
00f70463
00008067
00052783
80001737
83472703
00978793
40e787b3
00f52023
00008067
80001737
83c72783
00078863
0007a783
00f52023
83c72783
80001737
83472703
00c70713
00e7a623
00008067
800017b7
82d7c783
80001737
83072683
fbf78793
0017b793
00d7e7b3
82f72823
800017b7
04200713
82e78623
00008067
800017b7
04100713
82e786a3
800017b7
8207a823
00008067
00200793
02f50e63
00300713
00e5a023
00100713
00e50a63
00400713
02e50863
00050c63
00008067
800017b7
8347a703
06400793
fee7d8e3
0005a023
00008067
00100793
00f5a023
00008067
00f5a023
00008067
800016b7
83c6a783
ff010113
00812423
0007a603
00052403
02c7a703
0047a283
0087af83
0107af03
0147ae83
0187ae03
01c7a303
0207a883
0247a803
0287a583
00912223
00112623
00c42023
00052603
02e42623
00542223
01f42423
01e42823
01d42a23
01c42c23
00642e23
03142023
03042223
02b42423
00500713
00e52623
00c42023
0007a483
800017b7
8347a783
00942023
83c6a683
00c78793
00e42623
00f6a623
00442783
06078e63
00052783
00c12083
00812403
0007af83
0047af03
0087ae83
00c7ae03
0107a303
0147a883
0187a803
01c7a583
0207a603
0247a683
0287a703
02c7a783
01f52023
01e52223
01d52423
01c52623
00652823
01152a23
01052c23
00b52e23
02c52023
02d52223
02e52423
02f52623
00412483
01010113
00008067
00852503
00600793
00f42623
00840593
e79ff0ef
01200793
00942023
00c12083
00f42623
00812403
00412483
01010113
00008067
00250513
00b50533
00a62023
00008067
00560713
0c800813
03070833
00271793
00261613
00f50533
00d52023
06e52c23
00d52223
00c807b3
00f587b3
0107a683
00e7aa23
00e7ac23
00168713
00e7a823
00052703
010585b3
00c585b3
000017b7
00b787b3
fae7aa23
800017b7
00500713
82e7aa23
00008067
00b50663
00000513
00008067
800017b7
82a786a3
00100513
00008067
00254703
0035c783
800016b7
00e79c63
0240006f
0005c703
00150513
00158593
00f71e63
00054783
fe0796e3
00000513
00008067
82f686a3
fd5ff06f
fef758e3
800017b7
00a00713
82e7aa23
00100513
00008067
ffe50513
00153513
00008067
f7010113
08912223
800014b7
84048493
08112623
08812423
09212023
07312e23
07412c23
07512a23
07612823
07712623
07812423
07912223
07a12023
05b12e23
03048713
800016b7
82e6ac23
00e4a023
00200713
800007b7
800016b7
00e4a423
02800713
00e4a623
8296ae23
0004a223
7ac78793
01048713
0007c683
00170713
00178793
fed70fa3
fe0698e3
800007b7
7cc78793
01010713
0007c683
00170713
00178793
fed70fa3
fe0698e3
800018b7
96888d93
00a00793
64fdae23
b0002673
b0202773
800007b7
7ec78793
80002d37
00f12023
80001bb7
968d0793
00100c13
80001b37
800019b7
80001cb7
00f12223
80001a37
80cb8b93
04100d13
00700413
00800913
00c12423
00e12623
00100793
00012703
82f9a823
04200793
82fc8623
83ab06a3
03010793
00074683
00178793
00170713
fed78fa3
fe0698e3
03010593
01010513
e5dff0ef
65cda783
800016b7
00050713
00178793
64fdae23
00412783
83c6a503
00173713
6087a023
00500793
82fa2a23
82e9a823
0884a023
0884a223
0f24ac23
672da023
672da223
c29ff0ef
82ccc583
04000793
28b7f863
00000313
00000893
00100693
04100793
00300613
04300513
00000713
22a78663
22d70a63
00178793
0ff7f793
fef5f6e3
00030463
835a2a23
24088663
04300793
82fb06a3
04300e93
00161793
00c787b3
0287cf33
ff978793
00379713
40f707b3
41e787b3
01ae9863
834a2703
009f0f13
40ef0f33
001c0c13
06500713
eeec1ae3
00812603
00c12703
b0002373
b0202873
834a2e03
80008537
80008937
01c52023
8309a503
800089b7
80008437
00a92223
01d9a423
00b42623
0804a503
800083b7
800015b7
83c5a583
00a3a823
65cda503
800082b7
80008fb7
00a2aa23
0045a883
80008537
80008eb7
011fac23
0085ae03
800018b7
8388a883
01c52e23
00c5ae03
80008537
800084b7
03cea023
0048ae03
03c52223
0088aa03
80008e37
80008537
0344a423
00c8a483
800088b7
029e2623
03e52823
02f8aa23
80008537
00700f13
800087b7
03e52c23
02d7ae23
0105c503
800006b7
01058793
7ac68693
00051a63
01c0006f
0007c503
00168693
00050863
0006c583
00178793
fea586e3
0006c783
800086b7
40a787b3
0017b793
04f6a023
01014583
800007b7
7cc78693
01010793
00059a63
01c0006f
0007c583
00168693
00058863
0006c503
00178793
feb506e3
0006c783
800086b7
00012c03
40b787b3
0017b793
04f6a223
03014683
03010793
00069a63
01c0006f
0007c683
001c0c13
00068863
000c4583
00178793
fed586e3
000c4783
80008537
40c30333
40d787b3
0017b793
04f52423
800085b7
0465a623
40e80833
800086b7
0506a823
06400713
80008637
04e62a23
800097b7
00100713
fee7ae23
0000006f
00100713
00100893
dcd71ae3
000b8693
03010713
0006c603
00170713
00168693
fec70fa3
fe0618e3
000c0a93
000c0613
00100313
00000693
da5ff06f
82db4e83
dc1ff06f
82db4e83
00d00793
00100f13
00100693
dc9ff06f
59524844
4e4f5453
52502045
4152474f
53202c4d
20454d4f
49525453
0000474e
59524844
4e4f5453
52502045
4152474f
31202c4d
20545327
49525453
0000474e
59524844
4e4f5453
52502045
4152474f
32202c4d
20444e27
49525453
0000474e
59524844
4e4f5453
52502045
4152474f
33202c4d
20445227
49525453
0000474e
