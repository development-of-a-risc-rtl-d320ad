80008437
00000493
00000297
21828293
30529073
80008937
10090913
000032b7
03928293
41c65fb7
e6df8f93
00003f37
039f0f13
02000313
00090393
03f282b3
01e282b3
0053a023
00438393
fff30313
fe0316e3
01f00313
00090393
00030e13
0003a503
0043a583
00a5d663
00b3a023
00a3a223
00438393
fffe0e13
fe0e12e3
fff30313
fc031ae3
00000613
00000313
00090393
0003a503
00130313
02650533
00a60633
00438393
02000e13
ffc314e3
00c42023
800086b7
20068693
06400293
0056a023
0ff0000f
00700613
08c6a5af
0ff0000f
00c6a72f
0ff0000f
00c6a7af
0006a803
00b42223
00e42423
00f42623
01042823
0206a023
8000a2b7
ff428293
00100313
0062a023
000012b7
88828293
30429073
30046073
00000513
00100e93
02068793
00001337
bb830313
00150513
0ff0000f
01d7a02f
fff30313
fe0318e3
30047073
0007a803
00a42a23
01042c23
00000297
09028293
10529073
00400293
30229073
00000993
00000a13
00000a93
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
1f400313
00000000
001a8a93
fff30313
fe031ae3
00000073
8000a2b7
ff428293
0002a023
01342e23
03442023
03542223
02942423
00100293
80009337
ffc30313
00532023
0000006f
142022f3
00200393
02729263
141022f3
00000397
fac38393
00729a63
143022f3
00029663
00198993
0080006f
001a0a13
141022f3
00428293
14129073
10200073
34029073
342022f3
0002de63
00148493
8000a2b7
ff028293
0002a023
340022f3
30200073
00900393
00729863
00000297
f6428293
00028067
02542e23
00200293
80009337
ffc30313
00532023
f71ff06f
00000000
