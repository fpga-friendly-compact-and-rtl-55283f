// Inverse S-box, entry a at position a (row = high nibble)
28 c1 e8 64 c0 ec 8f fb e9 00 1d 27 32 9a cb df
bf 2d 30 75 bb 11 a9 af 9d 77 db 50 31 1b 80 93
37 36 79 62 86 a2 3b d4 48 ee fe cf 61 1e d2 fc
de 22 e4 83 1f 12 8d 4f 88 5a 45 8b ff 47 05 91
65 c9 7e 0f b8 0d 6a 51 f6 66 b2 d9 71 6b dd 09
06 13 95 4d e6 5d 87 76 fa c7 b3 f7 d5 c4 ad f2
9c 5b 2c a8 54 d7 a1 0a 4c b6 da cd 07 e3 08 8a
96 33 c3 0e fd 9e 2e ef 81 99 42 98 dc f3 15 3d
53 d6 40 e2 82 ab ae a7 34 cc 9f 19 92 ea bd 60
b5 1a f8 85 20 d3 bc f5 ce 67 69 ca 7c a0 e7 43
a3 7d f1 5f b0 03 55 eb 59 7b a6 01 3f c8 e0 25
21 ba d1 39 9b 4b 2f 63 6d 26 68 0c 16 4e 8c 3a
7f 24 89 3e c6 e1 5e 10 d8 44 a4 49 72 6f 57 41
f4 8e 46 0b 74 14 ed b7 97 b4 70 e5 18 a5 d0 58
38 b1 04 f9 23 7a aa 2a 52 6c f0 6e be c5 17 84
56 3c 94 c2 4a 2b 35 5c 78 29 ac 90 02 1c b9 73
