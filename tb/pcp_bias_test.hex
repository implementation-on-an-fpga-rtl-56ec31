019200
