// km_pkg: shared types of the K-means systolic array.
// A token flowing through the array carries a flag telling whether its
// data element belongs to a pixel vector or to a class-centre vector. The
// flag values are an encoding chosen for this design.
package km_pkg;
  typedef enum logic {
    KM_PIXEL  = 1'b0,   // data is one band of a pixel to classify
    KM_CENTER = 1'b1    // data is one band of a class centre to load
  } km_flag_e;
endpackage
