300000
