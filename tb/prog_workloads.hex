@000 2c1000000
@001 2c2000000
@002 2c3000000
@003 2c3e00000
@004 2c3e00000
@005 2c3e00000
@006 2c3e00000
@007 2c3e00000
@010 1258963e9
@011 1010043ed
@012 0fdef7be9
@013 3410f7800
@014 2c1400000
@020 13f9a03e8
@021 1020083ea
@022 0fdff7fe9
@023 3420f7c00
@024 12bcfa3f9
@025 1024093ec
@026 0fe0f83e9
@027 3424f8000
@028 2c2800000
@030 13e2b43e8
@031 07e3f8be9
@032 3036f8c00
@033 27e2f8beb
@034 13e2f8be9
@035 2c3700000
@036 2be2f8bee
@037 12d0f8be8
@038 10300c3ea
@039 10370dfec
@03a 0fe1f87e9
@03b 3430f8400
@03c 2c3c00000
@03e 2c3e00000
@258 000000064
@259 00000006b
@25a 000000072
@25b 000000079
@25c 000000080
@25d 000000087
@25e 00000008e
@25f 000000095
@260 00000009c
@261 0000000a3
@262 0000000aa
@263 0000000b1
@264 0000000b8
@265 0000000bf
@266 0000000c6
@267 0000000cd
@280 000001388
@281 00000138b
@282 00000138e
@283 000001391
@284 000001394
@285 000001397
@286 00000139a
@287 00000139d
@288 0000013a0
@289 0000013a3
@28a 0000013a6
@28b 0000013a9
@28c 0000013ac
@28d 0000013af
@28e 0000013b2
@28f 0000013b5
@2d0 000000007
@2d1 00000000a
@2d2 00000001b
@2d3 000000001
@2d4 000000002
@2d5 000000061
@2d6 000000040
@2d7 000000003
@3de 000000010
@3df 000000010
@3e0 000000010
@3e1 000000008
@3e8 000000000
@3e9 000000001
@3ea 000000400
@3eb 000000003
@3ec 000100000
@3ed 000100400
@3ee 800000000
