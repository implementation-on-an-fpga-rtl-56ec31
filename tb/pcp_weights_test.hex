3ff600
000300
