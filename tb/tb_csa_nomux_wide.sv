// tb_csa_nomux_wide: the carry select adder without multiplexer at wider
// sizes, where the fast carry network spans several 4-bit groups.
//
// Instances of 16 bits (4 groups) and 32 bits (8 groups, three prefix levels
// in the fast carry network) are driven with the same operands: corner
// cases first (zero, all ones, a carry entering at cin and propagating through
// every group, a carry generated in group 0 and propagating to the top), then
// random operands with random carry input, some forced to make whole groups
// propagate. Sum and carry out are compared with a+b+cin worked out here in
// 64-bit arithmetic. Combinational; each vector is checked 1 time unit after
// it is applied. A watchdog ends a hung run with a failure.
module tb_csa_nomux_wide;

  int checks   = 0;
  int failures = 0;

  logic [31:0] a, b, s32;
  logic [15:0] s16;
  logic        cin, co16, co32;

  csa_nomux_top #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(s16), .cout(co16));
  csa_nomux_top #(.WIDTH(32)) dut32 (.a(a), .b(b), .cin(cin), .sum(s32), .cout(co32));

  initial begin
    #100000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] va, input logic [31:0] vb, input logic vc);
    logic [63:0] e16, e32;
    a = va; b = vb; cin = vc;
    #1;
    e16 = 64'(va[15:0]) + 64'(vb[15:0]) + 64'(vc);
    e32 = 64'(va) + 64'(vb) + 64'(vc);
    checks++;
    if ({co16, s16} !== e16[16:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 16-bit %h+%h+%b: got %h exp %h", va[15:0], vb[15:0], vc, {co16, s16}, e16[16:0]);
    end
    checks++;
    if ({co32, s32} !== e32[32:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 32-bit %h+%h+%b: got %h exp %h", va, vb, vc, {co32, s32}, e32[32:0]);
    end
  endtask

  initial begin
    logic [31:0] ra, rb, mask;
    for (int c = 0; c < 2; c++) begin
      apply(32'h0, 32'h0, c[0]);
      apply(32'hffff_ffff, 32'h0, c[0]);           // every group propagates
      apply(32'hffff_ffff, 32'hffff_ffff, c[0]);
      apply(32'h5555_5555, 32'haaaa_aaaa, c[0]);   // propagate, split across a and b
      apply(32'hffff_ffff, 32'h1, c[0]);           // generate at bit 0, ripple to top
      apply(32'hffff_fff8, 32'h8, c[0]);           // generate in group 0 only
      apply(32'h7fff_ffff, 32'h0, c[0]);
      apply(32'h8000_0000, 32'h8000_0000, c[0]);
    end
    for (int i = 0; i < 200000; i++) begin
      ra = $urandom();
      rb = $urandom();
      if (i % 4 == 0) begin
        // force a random set of nibbles to propagate (a^b = 1111 in them)
        mask = 0;
        for (int k = 0; k < 8; k++) if ($urandom_range(1, 0) == 1) mask[k*4 +: 4] = 4'hf;
        rb = (rb & ~mask) | (~ra & mask);
      end
      apply(ra, rb, 1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
