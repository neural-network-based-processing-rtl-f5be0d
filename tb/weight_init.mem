000000000001
000000000010
011111111111
100000000000
111111111111
010101010101
101010101010
000011110000
