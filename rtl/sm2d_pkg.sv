// sm2d_pkg: constants and elaboration-time helpers shared by the 2-D S-method
// (SM) system.
//
// The 2-D SM of one frequency point (k1,k2) with a rectangular (2L+1)x(2L+1)
// frequency window is evaluated as a sum of real products of 2-D STFT
// elements placed symmetrically around (k1,k2):
//
//   SM_R = S(k1,k2)^2
//        + 2 * sum_{i1=0..L} sum_{i2=1..L} S(k1+i1,k2+i2) * S(k1-i1,k2-i2)
//        + 2 * sum_{i1=1..L} sum_{i2=0..L} S(k1+i1,k2-i2) * S(k1-i1,k2+i2)
//
// which has cn(L) = 2L^2 + 2L + 1 terms, one per clock cycle of the gateway.
// The helpers here order those terms and translate a cell of the window into
// the address of the window register that holds it.
//
// Term order (this design's choice): step 0 is the centre term (the 2-D
// spectrogram), then the terms are taken ring by ring, ring m holding the
// 4m terms whose largest |offset| is m.  Within a ring the first double sum
// comes first (i1 = 0..m, i2 = 1..m), then the second (i1 = 1..m,
// i2 = 0..m).  With this order the term list of a smaller L is a prefix of
// the list of a larger one, so one table serves every selectable L.
//
// Register addressing follows the window register numbering of the design:
// the register holding S(k1+a, k2+b), a,b in [-L,L], has address
// (L-a)*(2L+1) + (L-b); address 0 holds the newest element S(k1+L,k2+L) and
// the centre S(k1,k2) is at address 2L^2+2L.
package sm2d_pkg;

  // Number of gateway clock cycles (terms) of the SM with half-width l.
  function automatic int cn(input int l);
    return 2 * l * l + 2 * l + 1;
  endfunction

  // Address of the window register that holds S(k1+a, k2+b) in a window of
  // half-width l.
  function automatic int cell_addr(input int l, input int a, input int b);
    return (l - a) * (2 * l + 1) + (l - b);
  endfunction

  // Packed description of term number s of the schedule, for a window of
  // physical half-width l:  bits [11:0] first operand address,
  // [23:12] second operand address, [24] 1 when the product is doubled.
  function automatic int term_code(input int l, input int s);
    int k;
    int a1, a2;
    bit dbl;
    k   = 0;
    a1  = cell_addr(l, 0, 0);
    a2  = a1;
    dbl = 1'b0;
    if (s != 0) begin
      k = 1;
      for (int m = 1; m <= l; m++) begin
        // first double sum: S(k1+i1,k2+i2) * S(k1-i1,k2-i2)
        for (int i1 = 0; i1 <= m; i1++)
          for (int i2 = 1; i2 <= m; i2++)
            if ((i1 == m || i2 == m)) begin
              if (k == s) begin
                a1  = cell_addr(l, i1, i2);
                a2  = cell_addr(l, -i1, -i2);
                dbl = 1'b1;
              end
              k++;
            end
        // second double sum: S(k1+i1,k2-i2) * S(k1-i1,k2+i2)
        for (int i1 = 1; i1 <= m; i1++)
          for (int i2 = 0; i2 <= m; i2++)
            if ((i1 == m || i2 == m)) begin
              if (k == s) begin
                a1  = cell_addr(l, i1, -i2);
                a2  = cell_addr(l, -i1, i2);
                dbl = 1'b1;
              end
              k++;
            end
      end
    end
    return a1 | (a2 << 12) | (int'(dbl) << 24);
  endfunction

  // Configuration register addresses (order of the register stack).
  typedef enum logic [2:0] {
    CFG_FD  = 3'd0,   // FIFO delay, N-(2L+1)
    CFG_SC  = 3'd1,   // start of convolution, 2LN+(2L+1)-1
    CFG_WS  = 3'd2,   // window size, 2L+1
    CFG_DB  = 3'd3,   // down border, (N-2L)*N
    CFG_EOF = 3'd4    // end of frame, N*N-1
  } cfg_addr_e;

endpackage
