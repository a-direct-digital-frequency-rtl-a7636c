0503146003b
05061c503ee
07074eb0d9c
07071e817ba
050e2e82d66
