// Forward S-box, entry a at position a (row = high nibble)
09 ab fc a5 e2 3e 50 6c 6e 4f 67 d3 bb 45 73 43
c7 15 35 51 d5 7e bc ee dc 8b 91 1d fd 0a 2d 34
94 b0 31 e4 c1 af b9 0b 00 f9 e7 f5 62 11 76 b6
12 1c 0c 71 88 f6 21 20 e0 b3 bf 26 f1 7f c3 ac
82 cf 7a 9f c9 3a d2 3d 28 cb f4 b5 68 53 bd 37
1b 47 e8 80 64 a6 f0 ce df a8 39 61 f7 55 c6 a3
8f 2c 23 b7 03 40 49 99 ba 9a 46 4d e9 b8 eb cd
da 4c cc ff d4 13 57 19 f8 22 e5 a9 9c a1 42 c0
1e 78 84 33 ef 93 24 56 38 c2 6f 3b be 36 d1 06
fb 3f 8c 1f f2 52 70 d8 7b 79 0d b4 60 18 75 8a
9d 66 25 a0 ca dd aa 87 63 16 e6 85 fa 5e 86 17
a4 e1 4a 5a d9 90 69 d7 44 fe b1 14 96 8e ec 10
04 01 f3 72 5d ed c4 59 ad 41 9b 0e 89 6b 98 2b
de b2 2e 95 27 5c 81 65 c8 4b 6a 1a 7c 4e 30 0f
ae c5 83 6d 32 db 54 9e 02 08 8d a7 05 d6 29 77
ea a2 5f 7d d0 97 48 5b 92 e3 58 07 2f 74 2a 3c
