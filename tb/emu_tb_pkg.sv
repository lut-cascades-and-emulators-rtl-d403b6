// emu_tb_pkg: reference model shared by the emulator testbenches.
//
// It holds the four-cell cascade used as the running example of the
// emulator: Cell1 (x1..x4 -> u1, 2 rails), Cell2 (x5,u1 -> f2,f1,u2),
// Cell3 (x6,u2 -> f3,u3), Cell4 (x7,x8,u3 -> f5,f4). The cell tables are
// random and drawn by ex_randomize(); ex_eval() computes the primary outputs
// f5..f1 straight from the tables, independently of any memory layout.
// For an emulator with 6 address bits and 4 data bits it builds
//   map 0: one 16-word page per cell (unpacked),
//   map 1: the packed map, Cell1 and Cell4 sharing page 0 (D1D0 / D3D2),
//   map 2: map 1 with Cell3's rails moved to D3D2, so that Cell4 needs the
//          feedback shifter,
// plus the two-unit ring layout (Cell1, Cell3 on unit 0; Cell2, Cell4 on
// unit 1), and the configuration words that go with each.
// Inputs: x[0] = x1 .. x[7] = x8. Outputs: y[0] = f1 .. y[4] = f5.
package emu_tb_pkg;

  logic [1:0] t1 [16];
  logic [3:0] t2 [8];
  logic [2:0] t3 [8];
  logic [1:0] t4 [16];

  function automatic void ex_randomize();
    for (int i = 0; i < 16; i++) begin
      t1[i] = 2'($urandom);
      t4[i] = 2'($urandom);
    end
    for (int i = 0; i < 8; i++) begin
      t2[i] = 4'($urandom);
      t3[i] = 3'($urandom);
    end
  endfunction

  function automatic logic [4:0] ex_eval(logic [7:0] x);
    logic [1:0] u1, u2, u3;
    logic [3:0] c2;
    logic [2:0] c3;
    logic [1:0] c4;
    u1 = t1[{x[0], x[1], x[2], x[3]}];
    c2 = t2[{x[4], u1}];
    u2 = c2[1:0];
    c3 = t3[{x[5], u2}];
    u3 = c3[1:0];
    c4 = t4[{x[6], x[7], u3}];
    return {c4, c3[2], c2[3:2]};
  endfunction

  // Configuration word, layout as in lut_pkg::cfg_w.
  function automatic logic [127:0] pack_cfg(int addr_w, int n_in, int data_w, int out_w,
                                            int sel[16], int fb_shift, int off, int pos,
                                            int cnt, bit last);
    int selw, dpw, opw, cntw, b;
    logic [127:0] w;
    selw = $clog2(n_in + data_w + 2);
    dpw  = (data_w > 1) ? $clog2(data_w) : 1;
    opw  = (out_w > 1) ? $clog2(out_w) : 1;
    cntw = $clog2(data_w + 1);
    w = '0;
    b = 0;
    for (int j = 0; j < addr_w; j++) begin
      for (int k = 0; k < selw; k++) w[b+k] = sel[j][k];
      b += selw;
    end
    for (int k = 0; k < dpw; k++)  w[b+k] = fb_shift[k];
    b += dpw;
    for (int k = 0; k < dpw; k++)  w[b+k] = off[k];
    b += dpw;
    for (int k = 0; k < opw; k++)  w[b+k] = pos[k];
    b += opw;
    for (int k = 0; k < cntw; k++) w[b+k] = cnt[k];
    b += cntw;
    w[b] = last;
    return w;
  endfunction

  // Select codes for 8 inputs and 4 rails.
  localparam int C0 = 0, C1 = 1;
  function automatic int X(int i);  return 2 + i - 1; endfunction   // x_i, i = 1..8
  function automatic int FB(int j); return 10 + j;     endfunction  // rail bit j

  function automatic logic [3:0] ex_mem_word(int map, logic [5:0] a);
    logic [3:0] w;
    w = '0;
    if (map == 0) begin
      unique case (a[5:4])
        2'b00: w = {2'b00, t1[a[3:0]]};
        2'b01: w = (a[3] == 1'b0) ? t2[a[2:0]] : 4'h0;
        2'b10: w = (a[3] == 1'b0) ? {1'b0, t3[a[2:0]]} : 4'h0;
        default: w = {2'b00, t4[a[3:0]]};
      endcase
    end else if (a[5] == 1'b0) begin
      unique case (a[4:3])
        2'b00, 2'b01: w = {t4[a[3:0]], t1[a[3:0]]};
        2'b10: w = t2[a[2:0]];
        default: w = (map == 1) ? {1'b0, t3[a[2:0]]} : {t3[a[2:0]][1:0], t3[a[2:0]][2], 1'b0};
      endcase
    end
    return w;
  endfunction

  // Single-unit step words for the maps above (A0 first in sel).
  function automatic logic [127:0] ex_cfg(int map, int step);
    int s[16];
    s = '{default: 0};
    if (map == 0) begin
      unique case (step)
        0: begin s[5]=C0; s[4]=C0; s[3]=X(1); s[2]=X(2); s[1]=X(3); s[0]=X(4);
                 return pack_cfg(6, 8, 4, 5, s, 0, 0, 0, 0, 0); end
        1: begin s[5]=C0; s[4]=C1; s[3]=C0; s[2]=X(5); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, 0, 2, 0, 2, 0); end
        2: begin s[5]=C1; s[4]=C0; s[3]=C0; s[2]=X(6); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, 0, 2, 2, 1, 0); end
        default: begin s[5]=C1; s[4]=C1; s[3]=X(7); s[2]=X(8); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, 0, 0, 3, 2, 1); end
      endcase
    end else begin
      unique case (step)
        0: begin s[5]=C0; s[4]=C0; s[3]=X(1); s[2]=X(2); s[1]=X(3); s[0]=X(4);
                 return pack_cfg(6, 8, 4, 5, s, 0, 0, 0, 0, 0); end
        1: begin s[5]=C0; s[4]=C1; s[3]=C0; s[2]=X(5); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, 0, 2, 0, 2, 0); end
        2: begin s[5]=C0; s[4]=C1; s[3]=C1; s[2]=X(6); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, 0, (map == 1) ? 2 : 1, 2, 1, 0); end
        default: begin s[5]=C0; s[4]=C0; s[3]=X(7); s[2]=X(8); s[1]=FB(1); s[0]=FB(0);
                 return pack_cfg(6, 8, 4, 5, s, (map == 1) ? 0 : 2, 2, 3, 2, 1); end
      endcase
    end
  endfunction

  // Two-unit ring: unit 0 page 0 = Cell1, page 1 = Cell3;
  //                unit 1 page 0 = Cell2, page 1 = Cell4.
  function automatic logic [3:0] ring_mem_word(int unit, logic [5:0] a);
    logic [3:0] w;
    w = '0;
    if (a[5] == 1'b0) begin
      if (unit == 0) w = (a[4] == 1'b0) ? {2'b00, t1[a[3:0]]}
                                        : ((a[3] == 1'b0) ? {1'b0, t3[a[2:0]]} : 4'h0);
      else           w = (a[4] == 1'b0) ? ((a[3] == 1'b0) ? t2[a[2:0]] : 4'h0)
                                        : {2'b00, t4[a[3:0]]};
    end
    return w;
  endfunction

  function automatic logic [127:0] ring_cfg(int unit, int idx);
    int s[16];
    s = '{default: 0};
    if (unit == 0 && idx == 0) begin
      s[3]=X(1); s[2]=X(2); s[1]=X(3); s[0]=X(4);
      return pack_cfg(6, 8, 4, 5, s, 0, 0, 0, 0, 0);
    end else if (unit == 1 && idx == 0) begin
      s[2]=X(5); s[1]=FB(1); s[0]=FB(0);
      return pack_cfg(6, 8, 4, 5, s, 0, 2, 0, 2, 0);
    end else if (unit == 0) begin
      s[4]=C1; s[2]=X(6); s[1]=FB(1); s[0]=FB(0);
      return pack_cfg(6, 8, 4, 5, s, 0, 2, 2, 1, 0);
    end else begin
      s[4]=C1; s[3]=X(7); s[2]=X(8); s[1]=FB(1); s[0]=FB(0);
      return pack_cfg(6, 8, 4, 5, s, 0, 0, 3, 2, 1);
    end
  endfunction

endpackage
