80008437
00000493
00000297
30028293
30529073
00500513
00750593
00a58633
40b606b3
00c6c733
00371793
40a7d833
00f538b3
00c42023
00e42223
00f42423
01142623
00042383
00138393
00742823
00000e13
00000e93
01400f13
003e8e93
001e0e13
ffee1ce3
01d42a23
ff900513
00300593
02b50633
02b546b3
02b56733
02b537b3
0205d833
00c42c23
00d42e23
02e42023
02f42223
03042423
80a1b537
2c350513
02a42623
02c40583
02d44603
02e41683
02c40823
02d41923
02b42a23
02d42c23
03c40513
00a00593
00b52023
00500613
00c526af
08b5272f
100527af
00178793
18f5282f
18f528af
00052383
00d383b3
00e383b3
010383b3
011383b3
04742023
00000073
ffffffff
04942223
000022b7
80028293
3002b073
00000297
01028293
34129073
30200073
00000073
342022f3
04542423
00000517
01850513
02a005b7
59358593
00b52023
0000100f
00100593
04b42623
40000537
04f00593
00b52023
04b00593
00b52023
40001537
00100593
00b52423
03c00593
00b52023
00452603
00167613
fe061ce3
00052603
04c42823
00052423
02000537
0000c5b7
ff858593
00b50633
00062603
000045b7
00b505b3
0c860613
0005a223
00c5a023
08000293
3042a073
30046073
05442683
fe068ee3
0c000537
00100593
00b52223
00002637
00c50633
00200593
00b62023
40000537
00100593
00b52623
000012b7
80028293
3042a073
05842683
fe068ee3
30047073
800102b7
20000337
0cf30313
000013b7
80038393
007283b3
0063a023
20004337
40130313
000013b7
c0038393
007283b3
0063a023
800112b7
20008337
0c730313
0062a023
000022b7
30229073
00000297
09828293
10529073
800802b7
01028293
18029073
000022b7
80028293
3002b073
000012b7
80028293
3002a073
00000297
01028293
34129073
30200073
c0000537
123455b7
67858593
00b52423
00852603
04c42e23
d0000537
00052683
14202773
06e42023
00000073
18001073
80020537
00850513
00052583
06b42223
06942423
00100513
800095b7
ffc58593
00a5a023
0000006f
141022f3
00428293
14129073
10200073
800092b7
0062a023
0072a223
00148493
34202373
04034663
00800393
00730e63
00900393
02730063
34102373
00430313
34131073
0840006f
00000317
df030313
00c0006f
00000317
f8030313
34131073
00002337
80030313
30032073
05c0006f
0ff37313
00700393
02731263
02000337
000043b7
00730333
fff00393
00732223
00700393
04742a23
0300006f
0c000337
002003b7
00438393
00730333
00032383
06742623
400003b7
0043a383
04742c23
00100393
00732023
800092b7
0002a303
0042a383
30200073
