000040
000400
