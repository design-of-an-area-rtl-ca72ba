// mq_ref_pkg: sequential reference model of the JPEG2000 MQ encoder, used by
// the testbenches to compute expected results independently of the RTL.
// It follows the flow charts of the standard literally: a 32-bit C, one
// renormalisation shift per loop iteration, BYTEOUT with the sequential
// "B = B + 1 then test B == 0xFF" order, SETBITS and the two-byte FLUSH.
// It has its own copy of the probability table.
package mq_ref_pkg;

  class mq_ref_model;
    int unsigned qe_t   [47];
    int unsigned nmps_t [47];
    int unsigned nlps_t [47];
    bit          sw_t   [47];
    int unsigned ctx_i  [19];
    bit          ctx_m  [19];
    int unsigned a, c, ct;
    int          b;        // byte at the current output position
    bit          have_b;   // false while B is the discarded pre-buffer byte
    byte unsigned out_q[$];

    function new();
      int unsigned t[47][4] = '{
        '{'h5601, 1, 1,1}, '{'h3401, 2, 6,0}, '{'h1801, 3, 9,0}, '{'h0AC1, 4,12,0},
        '{'h0521, 5,29,0}, '{'h0221,38,33,0}, '{'h5601, 7, 6,1}, '{'h5401, 8,14,0},
        '{'h4801, 9,14,0}, '{'h3801,10,14,0}, '{'h3001,11,17,0}, '{'h2401,12,18,0},
        '{'h1C01,13,20,0}, '{'h1601,29,21,0}, '{'h5601,15,14,1}, '{'h5401,16,14,0},
        '{'h5101,17,15,0}, '{'h4801,18,16,0}, '{'h3801,19,17,0}, '{'h3401,20,18,0},
        '{'h3001,21,19,0}, '{'h2801,22,19,0}, '{'h2401,23,20,0}, '{'h2201,24,21,0},
        '{'h1C01,25,22,0}, '{'h1801,26,23,0}, '{'h1601,27,24,0}, '{'h1401,28,25,0},
        '{'h1201,29,26,0}, '{'h1101,30,27,0}, '{'h0AC1,31,28,0}, '{'h09C1,32,29,0},
        '{'h08A1,33,30,0}, '{'h0521,34,31,0}, '{'h0441,35,32,0}, '{'h02A1,36,33,0},
        '{'h0221,37,34,0}, '{'h0141,38,35,0}, '{'h0111,39,36,0}, '{'h0085,40,37,0},
        '{'h0049,41,38,0}, '{'h0025,42,39,0}, '{'h0015,43,40,0}, '{'h0009,44,41,0},
        '{'h0005,45,42,0}, '{'h0001,45,43,0}, '{'h5601,46,46,0}};
      foreach (t[k]) begin
        qe_t[k] = t[k][0]; nmps_t[k] = t[k][1]; nlps_t[k] = t[k][2]; sw_t[k] = t[k][3][0];
      end
      init();
    endfunction

    function void init();
      foreach (ctx_i[k]) begin ctx_i[k] = 0; ctx_m[k] = 0; end
      ctx_i[0] = 4; ctx_i[17] = 3; ctx_i[18] = 46;
      a = 'h8000; c = 0; ct = 12; b = 0; have_b = 0;
      out_q.delete();
    endfunction

    function void byteout();
      if (b == 'hFF) begin
        emit(); b = (c >> 20) & 'hFF; c = c & 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        emit(); b = (c >> 19) & 'hFF; c = c & 'h7FFFF; ct = 8;
      end else begin
        b = b + 1;
        if (b == 'hFF) begin
          c = c & 'h7FFFFFF;
          emit(); b = (c >> 20) & 'hFF; c = c & 'hFFFFF; ct = 7;
        end else begin
          emit(); b = (c >> 19) & 'hFF; c = c & 'h7FFFF; ct = 8;
        end
      end
    endfunction

    // BP = BP + 1: the byte at the old position becomes final.
    function void emit();
      if (have_b) out_q.push_back(byte'(b));
      have_b = 1;
    endfunction

    function void renorme();
      do begin
        a = (a << 1) & 'hFFFF; c = c << 1; ct = ct - 1;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
    endfunction

    function void encode(int cx, bit d);
      int unsigned qe = qe_t[ctx_i[cx]];
      if (d == ctx_m[cx]) begin
        a = a - qe;
        if ((a & 'h8000) == 0) begin
          if (a < qe) a = qe; else c = c + qe;
          ctx_i[cx] = nmps_t[ctx_i[cx]];
          renorme();
        end else c = c + qe;
      end else begin
        a = a - qe;
        if (a < qe) c = c + qe; else a = qe;
        if (sw_t[ctx_i[cx]]) ctx_m[cx] = !ctx_m[cx];
        ctx_i[cx] = nlps_t[ctx_i[cx]];
        renorme();
      end
    endfunction

    function void flush();
      int unsigned tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c = c - 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      if (b != 'hFF) emit();
    endfunction
  endclass

endpackage
