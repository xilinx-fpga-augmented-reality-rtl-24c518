030400410030c3ff
