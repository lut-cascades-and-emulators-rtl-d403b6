// lut_pkg: constants and helper functions shared by the LUT cascade and
// emulator modules.
//
// The programmable interconnection network (PIN) of an emulator unit builds
// every address bit of the memory for logic from one source, picked by a
// select code:
//   code 0                      constant 0 (page bits)
//   code 1                      constant 1 (page bits)
//   code 2 .. 2+N_IN-1          primary input x[code-2]
//   code 2+N_IN .. 2+N_IN+W-1   rail bit fb[code-2-N_IN] after the feedback shifter
// The code layout is a choice of this design; the document only says that
// the network connects primary inputs, rails and page bits to the address.
package lut_pkg;

  localparam int unsigned PIN_CONST0 = 0;
  localparam int unsigned PIN_CONST1 = 1;
  localparam int unsigned PIN_X_BASE = 2;

  // Width of one PIN select code for N_IN primary inputs and W rail bits.
  function automatic int unsigned pin_sel_w(int unsigned n_in, int unsigned w);
    return $clog2(n_in + w + 2);
  endfunction

  // Width of a shift amount / bit position into a W-bit word.
  function automatic int unsigned pos_w(int unsigned w);
    return (w > 1) ? $clog2(w) : 1;
  endfunction

  // Width of a bit count 0..W.
  function automatic int unsigned cnt_w(int unsigned w);
    return $clog2(w + 1);
  endfunction

  // Width of one step configuration word held in the memory for
  // interconnection. Layout, LSB first:
  //   sel[0] .. sel[ADDR_W-1]   PIN select codes, one per address bit
  //   fb_shift                  right shift applied to the rails (packing)
  //   out_off                   first data bit that goes to the outputs
  //   out_pos                   its position in the output register
  //   out_cnt                   number of data bits written to the outputs
  //   last                      this step is the last one of the evaluation
  function automatic int unsigned cfg_w(int unsigned addr_w, int unsigned n_in,
                                        int unsigned data_w, int unsigned out_w);
    return addr_w * pin_sel_w(n_in, data_w) + 2 * pos_w(data_w) + pos_w(out_w)
           + cnt_w(data_w) + 1;
  endfunction

  // Number of primary inputs of a uniform cascade: the first cell takes
  // IN_W inputs, every further cell IN_W - RAILS new ones.
  function automatic int unsigned cascade_n_in(int unsigned cells, int unsigned in_w,
                                               int unsigned rails);
    return in_w + (cells - 1) * (in_w - rails);
  endfunction

endpackage
