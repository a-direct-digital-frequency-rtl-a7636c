0503146003b
05061c503ee
07074eb0d9c
07071e817ba
070b2c7259c
071236a3658
