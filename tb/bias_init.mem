111110011100
