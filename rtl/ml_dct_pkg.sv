// ml_dct_pkg - constants shared by the approximate DCT and its testbenches.
//
// The transform is an 8-point signed DCT computed in three adder stages,
// each followed by a pipeline register; each stage widens the words by one
// bit so that no intermediate value can overflow.
package ml_dct_pkg;

  localparam int unsigned N_PTS    = 8;   // points per transform
  localparam int unsigned LATENCY  = 3;   // adder stages = register stages
                                          // = cycles from input to output

  // word width after stage s (s = 0 is the input)
  function automatic int unsigned stage_w(int unsigned data_w, int unsigned s);
    return data_w + s;
  endfunction

endpackage
