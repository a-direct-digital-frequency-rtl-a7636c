0503146003b
070316402ae
07061e60676
07074eb0d9c
07071e817ba
070b2c7259c
071236a3658
