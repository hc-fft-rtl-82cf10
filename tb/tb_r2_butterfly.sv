// Self-checking test of r2_butterfly: random and corner-case operand pairs;
// expected s = (a+b)/2 and d = (a-b)/2 rounded to nearest with ties to even,
// saturated to DW bits (random full-range operands and the extreme values),
// one clock after the inputs.
module tb_r2_butterfly;
  import hcfft_pkg::*;

  logic  clk = 1'b0;
  cplx_t a, b, s, d;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  r2_butterfly dut (.clk, .a, .b, .s, .d);

  localparam longint MAXV = (longint'(1) <<< (DW-1)) - 1;
  localparam longint MINV = -(longint'(1) <<< (DW-1));

  // reference: v/2 rounded to nearest, ties to even, saturated to DW bits
  function automatic longint ref_half(input longint v);
    longint r;
    r = v >>> 1;                       // floor(v/2)
    if (v[0] && r[0]) r = r + 1;       // exact half: pick the even neighbour
    if (r > MAXV) r = MAXV;
    if (r < MINV) r = MINV;
    return r;
  endfunction

  task automatic apply(input longint ar, input longint ai, input longint br, input longint bi);
    a.re = DW'(ar); a.im = DW'(ai); b.re = DW'(br); b.im = DW'(bi);
    @(posedge clk); #1;
    checks += 4;
    if (longint'(s.re) != ref_half(ar + br)) begin failures++; $display("s.re %0d+%0d -> %0d", ar, br, s.re); end
    if (longint'(s.im) != ref_half(ai + bi)) begin failures++; $display("s.im %0d+%0d -> %0d", ai, bi, s.im); end
    if (longint'(d.re) != ref_half(ar - br)) begin failures++; $display("d.re %0d-%0d -> %0d", ar, br, d.re); end
    if (longint'(d.im) != ref_half(ai - bi)) begin failures++; $display("d.im %0d-%0d -> %0d", ai, bi, d.im); end
  endtask

  // random DW-bit value
  function automatic longint rnd();
    logic signed [DW-1:0] v;
    v = DW'({$urandom, $urandom});
    return longint'(v);
  endfunction

  initial begin
    a = '0; b = '0;
    @(negedge clk);
    apply(MAXV, MINV, MINV, MAXV);
    apply(MINV, MAXV, MAXV, MINV);
    apply(MAXV, MAXV, MINV, MINV);
    apply(3, 1, 0, 0);
    apply(1, -1, 0, 0);
    apply(-3, 5, 0, 2);
    for (int i = 0; i < 2000; i++) apply(rnd(), rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
