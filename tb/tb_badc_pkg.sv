// tb_badc_pkg: reference functions shared by the BADC testbenches. They
// restate the design's arithmetic independently of the RTL: the analog value
// each simulated module channel presents, the ADC transfer function and the
// threshold/correction rule of the readout program.
package tb_badc_pkg;

  // analog level of crate address `addr` (station*32 + channel), millivolts
  function automatic int unsigned chan_mv(int unsigned addr, int unsigned seed);
    int unsigned h;
    h = (addr * 32'd2654435761) ^ (seed * 32'd40503);
    h = h ^ (h >> 13);
    return (h % 5000);
  endfunction

  // EH12B3 model transfer: 0..5.12 V -> 0..4095
  function automatic int unsigned adc_code(int unsigned mv);
    int unsigned c;
    c = (mv * 4096) / 5120;
    return (c > 4095) ? 4095 : c;
  endfunction

  // corrected value: x = q - delta; t = alpha + hi16(beta*x); out = (t*x)[27:12]
  function automatic logic [15:0] correct(logic [15:0] q, logic [15:0] delta,
                                          logic [15:0] alpha, logic [15:0] beta);
    logic signed [15:0] x, t;
    logic signed [31:0] p1, p2;
    x  = signed'(q - delta);
    p1 = signed'(beta) * x;
    t  = signed'(alpha + p1[31:16]);
    p2 = t * x;
    return p2[27:12];
  endfunction

  // 16x16 two's complement product
  function automatic logic [31:0] smul(logic [15:0] a, logic [15:0] b);
    logic signed [31:0] p;
    p = signed'(a) * signed'(b);
    return p;
  endfunction
endpackage
