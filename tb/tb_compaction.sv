// tb_compaction: self-checking test of the compaction stage.
//
// First the two iterations of the 4-element worked example: elements
// (0,3,2,1) with predicates (0,1,0,1) must go to addresses (2,0,3,1)
// giving (3,1,0,2); then (3,1,0,2) with predicates (1,0,0,1) must go to
// (0,2,3,1) giving (3,2,1,0). Then random elements and predicates for N = 8
// and N = 6: the prefix sums are computed here, and the output must be the
// stable partition (predicate-1 elements first, each group in input order).
module tb_compaction;
  localparam int unsigned K  = 3;
  localparam int unsigned N4 = 4, W4 = $clog2(N4 + 1), A4 = $clog2(N4);
  localparam int unsigned N8 = 8, W8 = $clog2(N8 + 1), A8 = $clog2(N8);
  localparam int unsigned N6 = 6, W6 = $clog2(N6 + 1), A6 = $clog2(N6);

  logic [K-1:0] e4 [N4]; logic [N4-1:0] p4; logic [W4-1:0] x4 [N4];
  logic [A4-1:0] a4 [N4]; logic [K-1:0] r4 [N4];
  logic [K-1:0] e8 [N8]; logic [N8-1:0] p8; logic [W8-1:0] x8 [N8];
  logic [A8-1:0] a8 [N8]; logic [K-1:0] r8 [N8];
  logic [K-1:0] e6 [N6]; logic [N6-1:0] p6; logic [W6-1:0] x6 [N6];
  logic [A6-1:0] a6 [N6]; logic [K-1:0] r6 [N6];

  int checks = 0, failures = 0;

  compaction #(.N(N4), .K(K)) dut4 (.elements(e4), .pred(p4), .prefix(x4), .addr(a4), .reordered(r4));
  compaction #(.N(N8), .K(K)) dut8 (.elements(e8), .pred(p8), .prefix(x8), .addr(a8), .reordered(r8));
  compaction #(.N(N6), .K(K)) dut6 (.elements(e6), .pred(p6), .prefix(x6), .addr(a6), .reordered(r6));

  task automatic cmp(string tag, int j, int got, int e);
    checks++;
    if (got != e) begin
      failures++;
      $display("%s mismatch at %0d got=%0d exp=%0d", tag, j, got, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_a1 [4] = '{2, 0, 3, 1};
    int ex_r1 [4] = '{3, 1, 0, 2};
    int ex_a2 [4] = '{0, 2, 3, 1};
    int ex_r2 [4] = '{3, 2, 1, 0};
    int q [$];
    int s;

    // Worked example, first iteration (bit 0, descending).
    e4 = '{3'd0, 3'd3, 3'd2, 3'd1};
    p4 = 4'b1010;
    x4 = '{3'd0, 3'd1, 3'd1, 3'd2};
    #1;
    for (int j = 0; j < 4; j++) begin
      cmp("ex1 addr", j, int'(a4[j]), ex_a1[j]);
      cmp("ex1 data", j, int'(r4[j]), ex_r1[j]);
    end
    // Second iteration (bit 1).
    e4 = '{3'd3, 3'd1, 3'd0, 3'd2};
    p4 = 4'b1001;
    x4 = '{3'd1, 3'd1, 3'd1, 3'd2};
    #1;
    for (int j = 0; j < 4; j++) begin
      cmp("ex2 addr", j, int'(a4[j]), ex_a2[j]);
      cmp("ex2 data", j, int'(r4[j]), ex_r2[j]);
    end

    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < N8; j++) e8[j] = K'($urandom);
      for (int j = 0; j < N6; j++) e6[j] = K'($urandom);
      p8 = N8'($urandom);
      p6 = N6'($urandom);
      if (t == 0) begin p8 = '1; p6 = '0; end
      if (t == 1) begin p8 = '0; p6 = '1; end
      s = 0;
      for (int j = 0; j < N8; j++) begin s += p8[j]; x8[j] = W8'(s); end
      s = 0;
      for (int j = 0; j < N6; j++) begin s += p6[j]; x6[j] = W6'(s); end
      #1;
      q = {};
      for (int j = 0; j < N8; j++) if (p8[j])  q.push_back(int'(e8[j]));
      for (int j = 0; j < N8; j++) if (!p8[j]) q.push_back(int'(e8[j]));
      for (int j = 0; j < N8; j++) cmp("N8", j, int'(r8[j]), q[j]);
      q = {};
      for (int j = 0; j < N6; j++) if (p6[j])  q.push_back(int'(e6[j]));
      for (int j = 0; j < N6; j++) if (!p6[j]) q.push_back(int'(e6[j]));
      for (int j = 0; j < N6; j++) cmp("N6", j, int'(r6[j]), q[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
