0019
004b
007e
00b0
00e2
0114
0147
0179
01ab
01de
0210
0242
0274
02a7
02d9
030b
033d
0370
03a2
03d4
0406
0439
046b
049d
04cf
0501
0534
0566
0598
05ca
05fd
062f
0661
0693
06c5
06f8
072a
075c
078e
07c0
07f2
0825
0857
0889
08bb
08ed
091f
0951
0984
09b6
09e8
0a1a
0a4c
0a7e
0ab0
0ae2
0b14
0b47
0b79
0bab
0bdd
0c0f
0c41
0c73
0ca5
0cd7
0d09
0d3b
0d6d
0d9f
0dd1
0e03
0e35
0e67
0e99
0ecb
0efc
0f2e
0f60
0f92
0fc4
0ff6
1028
105a
108c
10bd
10ef
1121
1153
1185
11b6
11e8
121a
124c
127d
12af
12e1
1313
1344
1376
13a8
13d9
140b
143d
146e
14a0
14d1
1503
1535
1566
1598
15c9
15fb
162c
165e
168f
16c1
16f2
1724
1755
1787
17b8
17e9
181b
184c
187d
18af
18e0
1911
1943
1974
19a5
19d6
1a08
1a39
1a6a
1a9b
1acc
1afe
1b2f
1b60
1b91
1bc2
1bf3
1c24
1c55
1c86
1cb7
1ce8
1d19
1d4a
1d7b
1dac
1ddd
1e0e
1e3e
1e6f
1ea0
1ed1
1f02
1f32
1f63
1f94
1fc5
1ff5
2026
2057
2087
20b8
20e8
2119
2149
217a
21aa
21db
220b
223c
226c
229d
22cd
22fd
232e
235e
238e
23bf
23ef
241f
244f
2480
24b0
24e0
2510
2540
2570
25a0
25d0
2600
2630
2660
2690
26c0
26f0
2720
2750
2780
27af
27df
280f
283f
286e
289e
28ce
28fd
292d
295c
298c
29bc
29eb
2a1b
2a4a
2a79
2aa9
2ad8
2b08
2b37
2b66
2b95
2bc5
2bf4
2c23
2c52
2c81
2cb1
2ce0
2d0f
2d3e
2d6d
2d9c
2dcb
2dfa
2e28
2e57
2e86
2eb5
2ee4
2f13
2f41
2f70
2f9f
2fcd
2ffc
302a
3059
3088
30b6
30e5
3113
3141
3170
319e
31cc
31fb
3229
3257
3285
32b4
32e2
3310
333e
336c
339a
33c8
33f6
3424
3452
3480
34ad
34db
3509
3537
3564
3592
35c0
35ed
361b
3648
3676
36a3
36d1
36fe
372c
3759
3786
37b4
37e1
380e
383b
3868
3895
38c2
38f0
391d
3949
3976
39a3
39d0
39fd
3a2a
3a57
3a83
3ab0
3add
3b09
3b36
3b62
3b8f
3bbb
3be8
3c14
3c41
3c6d
3c99
3cc5
3cf2
3d1e
3d4a
3d76
3da2
3dce
3dfa
3e26
3e52
3e7e
3eaa
3ed6
3f01
3f2d
3f59
3f85
3fb0
3fdc
4007
4033
405e
408a
40b5
40e0
410c
4137
4162
418d
41b9
41e4
420f
423a
4265
4290
42bb
42e6
4310
433b
4366
4391
43bb
43e6
4411
443b
4466
4490
44ba
44e5
450f
4539
4564
458e
45b8
45e2
460c
4636
4660
468a
46b4
46de
4708
4732
475c
4785
47af
47d9
4802
482c
4855
487f
48a8
48d1
48fb
4924
494d
4976
49a0
49c9
49f2
4a1b
4a44
4a6d
4a95
4abe
4ae7
4b10
4b38
4b61
4b8a
4bb2
4bdb
4c03
4c2c
4c54
4c7c
4ca5
4ccd
4cf5
4d1d
4d45
4d6d
4d95
4dbd
4de5
4e0d
4e35
4e5d
4e84
4eac
4ed4
4efb
4f23
4f4a
4f72
4f99
4fc0
4fe8
500f
5036
505d
5084
50ac
50d3
50f9
5120
5147
516e
5195
51bb
51e2
5209
522f
5256
527c
52a3
52c9
52ef
5316
533c
5362
5388
53ae
53d4
53fa
5420
5446
546c
5491
54b7
54dd
5502
5528
554e
5573
5598
55be
55e3
5608
562d
5653
5678
569d
56c2
56e7
570c
5730
5755
577a
579f
57c3
57e8
580c
5831
5855
5879
589e
58c2
58e6
590a
592e
5952
5976
599a
59be
59e2
5a06
5a29
5a4d
5a71
5a94
5ab8
5adb
5aff
5b22
5b45
5b68
5b8c
5baf
5bd2
5bf5
5c18
5c3a
5c5d
5c80
5ca3
5cc5
5ce8
5d0b
5d2d
5d50
5d72
5d94
5db7
5dd9
5dfb
5e1d
5e3f
5e61
5e83
5ea5
5ec7
5ee8
5f0a
5f2c
5f4d
5f6f
5f90
5fb2
5fd3
5ff4
6016
6037
6058
6079
609a
60bb
60dc
60fd
611d
613e
615f
617f
61a0
61c0
61e1
6201
6221
6242
6262
6282
62a2
62c2
62e2
6302
6322
6342
6361
6381
63a0
63c0
63df
63ff
641e
643e
645d
647c
649b
64ba
64d9
64f8
6517
6536
6554
6573
6592
65b0
65cf
65ed
660c
662a
6648
6666
6684
66a3
66c1
66de
66fc
671a
6738
6756
6773
6791
67ae
67cc
67e9
6806
6824
6841
685e
687b
6898
68b5
68d2
68ef
690c
6928
6945
6961
697e
699a
69b7
69d3
69ef
6a0b
6a28
6a44
6a60
6a7c
6a97
6ab3
6acf
6aeb
6b06
6b22
6b3d
6b59
6b74
6b8f
6baa
6bc6
6be1
6bfc
6c17
6c32
6c4c
6c67
6c82
6c9d
6cb7
6cd2
6cec
6d06
6d21
6d3b
6d55
6d6f
6d89
6da3
6dbd
6dd7
6df1
6e0a
6e24
6e3e
6e57
6e71
6e8a
6ea3
6ebd
6ed6
6eef
6f08
6f21
6f3a
6f53
6f6b
6f84
6f9d
6fb5
6fce
6fe6
6fff
7017
702f
7047
705f
7077
708f
70a7
70bf
70d7
70ef
7106
711e
7135
714d
7164
717b
7193
71aa
71c1
71d8
71ef
7206
721c
7233
724a
7260
7277
728d
72a4
72ba
72d0
72e7
72fd
7313
7329
733f
7355
736a
7380
7396
73ab
73c1
73d6
73eb
7401
7416
742b
7440
7455
746a
747f
7494
74a8
74bd
74d2
74e6
74fb
750f
7523
7538
754c
7560
7574
7588
759c
75af
75c3
75d7
75ea
75fe
7611
7625
7638
764b
765e
7672
7685
7698
76aa
76bd
76d0
76e3
76f5
7708
771a
772d
773f
7751
7763
7775
7787
7799
77ab
77bd
77cf
77e0
77f2
7803
7815
7826
7838
7849
785a
786b
787c
788d
789e
78af
78bf
78d0
78e1
78f1
7901
7912
7922
7932
7942
7953
7962
7972
7982
7992
79a2
79b1
79c1
79d0
79e0
79ef
79fe
7a0e
7a1d
7a2c
7a3b
7a49
7a58
7a67
7a76
7a84
7a93
7aa1
7ab0
7abe
7acc
7ada
7ae8
7af6
7b04
7b12
7b20
7b2e
7b3b
7b49
7b56
7b64
7b71
7b7e
7b8b
7b99
7ba6
7bb3
7bbf
7bcc
7bd9
7be6
7bf2
7bff
7c0b
7c18
7c24
7c30
7c3c
7c48
7c54
7c60
7c6c
7c78
7c83
7c8f
7c9b
7ca6
7cb1
7cbd
7cc8
7cd3
7cde
7ce9
7cf4
7cff
7d0a
7d15
7d1f
7d2a
7d34
7d3f
7d49
7d53
7d5d
7d68
7d72
7d7c
7d85
7d8f
7d99
7da3
7dac
7db6
7dbf
7dc9
7dd2
7ddb
7de4
7ded
7df6
7dff
7e08
7e11
7e19
7e22
7e2a
7e33
7e3b
7e43
7e4c
7e54
7e5c
7e64
7e6c
7e74
7e7b
7e83
7e8b
7e92
7e9a
7ea1
7ea8
7eb0
7eb7
7ebe
7ec5
7ecc
7ed3
7ed9
7ee0
7ee7
7eed
7ef4
7efa
7f00
7f06
7f0d
7f13
7f19
7f1f
7f24
7f2a
7f30
7f36
7f3b
7f41
7f46
7f4b
7f50
7f56
7f5b
7f60
7f65
7f6a
7f6e
7f73
7f78
7f7c
7f81
7f85
7f89
7f8e
7f92
7f96
7f9a
7f9e
7fa2
7fa5
7fa9
7fad
7fb0
7fb4
7fb7
7fba
7fbe
7fc1
7fc4
7fc7
7fca
7fcd
7fcf
7fd2
7fd5
7fd7
7fda
7fdc
7fde
7fe1
7fe3
7fe5
7fe7
7fe9
7feb
7fec
7fee
7ff0
7ff1
7ff3
7ff4
7ff6
7ff7
7ff8
7ff9
7ffa
7ffb
7ffc
7ffd
7ffd
7ffe
7ffe
7fff
7fff
7fff
7fff
7fff
7fff
