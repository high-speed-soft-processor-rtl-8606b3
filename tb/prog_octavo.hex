@000 2c1000000
@001 2c2000000
@002 2c3000000
@003 2c5000000
@004 2c8000000
@005 2ca000000
@006 2cc800000
@007 2cc800000
@010 13f1fcfe9
@011 2c1000000
@020 13f2fc3ea
@021 2c2000000
@030 13f8fafe8
@031 13f8fb3e8
@032 13f8fb7e8
@033 13f9fa7e8
@034 13f9fabe8
@035 13acfa3f8
@036 13adfa3f9
@037 13aefa3f9
@038 27afeb3ad
@039 0fafebfae
@03a 23b0fbfed
@03b 13afebfb0
@03c 13f0ebfe8
@03d 2c3000000
@050 105bf53e8
@051 105ef5be8
@052 13a2fafe8
@053 0fa2e8be9
@054 3453e8800
@055 3057e8800
@056 13a3fbbe8
@057 3c63fa400
@058 385afa400
@059 13a3fbbe8
@05a 105bf57e8
@05b 13a4fa7e8
@05c 105ef5fe8
@05d 13e4fa3e8
@05e 13a3fa7e8
@05f 13f3e8fa4
@060 2c5000000
@063 13a3fbbe8
@064 2c6300000
@080 0398f7bdf
@081 0799f7bdf
@082 0b9af7bdf
@083 0f9bf7bdf
@084 139cf7bdf
@085 239df7bdf
@086 279ef7bdf
@087 2b9ff7bdf
@088 2c8000000
@0a0 27cafd3eb
@0a1 13f5f2be8
@0a2 2ca000000
@0c8 2cc800000
@3d4 13a4fa7e8
@3d5 13a4fb3e8
@3d6 13a3fa7e8
@3d7 13a3fabe8
@3de 912345678
@3df 00abcdef1
@3e8 000000000
@3e9 000000001
@3ea 000000002
@3eb 000000003
@3ec 000000004
@3ed 000000005
@3ee 000000007
@3ef fffffffff
