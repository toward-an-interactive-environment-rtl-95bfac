00 00 00 00 00 00 00 00  // 0x20 ' '
10 10 10 10 10 00 10 00  // 0x21 '!'
28 28 00 00 00 00 00 00  // 0x22 '"'
28 28 7c 28 7c 28 28 00  // 0x23 '#'
10 3c 50 38 14 78 10 00  // 0x24 '$'
60 64 08 10 20 4c 0c 00  // 0x25 '%'
30 48 50 20 54 48 34 00  // 0x26 '&'
10 10 00 00 00 00 00 00  // 0x27 '''
08 10 20 20 20 10 08 00  // 0x28 '('
20 10 08 08 08 10 20 00  // 0x29 ')'
00 10 54 38 54 10 00 00  // 0x2a '*'
00 10 10 7c 10 10 00 00  // 0x2b '+'
00 00 00 00 18 10 20 00  // 0x2c ','
00 00 00 7c 00 00 00 00  // 0x2d '-'
00 00 00 00 00 30 30 00  // 0x2e '.'
00 04 08 10 20 40 00 00  // 0x2f '/'
38 44 4c 54 64 44 38 00  // 0x30 '0'
10 30 10 10 10 10 38 00  // 0x31 '1'
38 44 04 08 10 20 7c 00  // 0x32 '2'
7c 08 10 08 04 44 38 00  // 0x33 '3'
08 18 28 48 7c 08 08 00  // 0x34 '4'
7c 40 78 04 04 44 38 00  // 0x35 '5'
18 20 40 78 44 44 38 00  // 0x36 '6'
7c 04 08 10 20 20 20 00  // 0x37 '7'
38 44 44 38 44 44 38 00  // 0x38 '8'
38 44 44 3c 04 08 30 00  // 0x39 '9'
00 30 30 00 30 30 00 00  // 0x3a ':'
00 30 30 00 30 10 20 00  // 0x3b ';'
08 10 20 40 20 10 08 00  // 0x3c '<'
00 00 7c 00 7c 00 00 00  // 0x3d '='
20 10 08 04 08 10 20 00  // 0x3e '>'
38 44 04 08 10 00 10 00  // 0x3f '?'
38 44 04 34 54 54 38 00  // 0x40 '@'
38 44 44 7c 44 44 44 00  // 0x41 'A'
78 44 44 78 44 44 78 00  // 0x42 'B'
38 44 40 40 40 44 38 00  // 0x43 'C'
70 48 44 44 44 48 70 00  // 0x44 'D'
7c 40 40 78 40 40 7c 00  // 0x45 'E'
7c 40 40 78 40 40 40 00  // 0x46 'F'
38 44 40 5c 44 44 3c 00  // 0x47 'G'
44 44 44 7c 44 44 44 00  // 0x48 'H'
38 10 10 10 10 10 38 00  // 0x49 'I'
1c 08 08 08 08 48 30 00  // 0x4a 'J'
44 48 50 60 50 48 44 00  // 0x4b 'K'
40 40 40 40 40 40 7c 00  // 0x4c 'L'
44 6c 54 54 44 44 44 00  // 0x4d 'M'
44 44 64 54 4c 44 44 00  // 0x4e 'N'
38 44 44 44 44 44 38 00  // 0x4f 'O'
78 44 44 78 40 40 40 00  // 0x50 'P'
38 44 44 44 54 48 34 00  // 0x51 'Q'
78 44 44 78 50 48 44 00  // 0x52 'R'
3c 40 40 38 04 04 78 00  // 0x53 'S'
7c 10 10 10 10 10 10 00  // 0x54 'T'
44 44 44 44 44 44 38 00  // 0x55 'U'
44 44 44 44 44 28 10 00  // 0x56 'V'
44 44 44 54 54 54 28 00  // 0x57 'W'
44 44 28 10 28 44 44 00  // 0x58 'X'
44 44 28 10 10 10 10 00  // 0x59 'Y'
7c 04 08 10 20 40 7c 00  // 0x5a 'Z'
38 20 20 20 20 20 38 00  // 0x5b '['
00 40 20 10 08 04 00 00  // 0x5c '\'
38 08 08 08 08 08 38 00  // 0x5d ']'
10 28 44 00 00 00 00 00  // 0x5e '^'
00 00 00 00 00 00 7c 00  // 0x5f '_'
