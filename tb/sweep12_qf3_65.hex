07031450014
070314b0099
070316402ae
07061e60676
07074eb0d9c
09071c514c5
090a2461ba9
090a36a21c7
090b2482964
071236a3658
