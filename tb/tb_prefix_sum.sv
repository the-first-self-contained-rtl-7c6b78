// tb_prefix_sum: self-checking test of the prefix-sum network.
//
// Checks the worked example (predicates 0,1,0,1 give 0,1,1,2), then random
// predicate vectors for a power-of-two width (16) and a width that is not
// one (11), each output against a running sum computed here. All-ones
// vectors check that the top lane reaches N.
module tb_prefix_sum;
  localparam int unsigned NA = 16;
  localparam int unsigned NB = 11;
  localparam int unsigned NC = 4;
  localparam int unsigned WA = $clog2(NA + 1);
  localparam int unsigned WB = $clog2(NB + 1);
  localparam int unsigned WC = $clog2(NC + 1);

  logic [NA-1:0] pa;  logic [WA-1:0] xa [NA];
  logic [NB-1:0] pb;  logic [WB-1:0] xb [NB];
  logic [NC-1:0] pc;  logic [WC-1:0] xc [NC];

  int checks = 0, failures = 0;

  prefix_sum #(.N(NA)) dut_a (.pred(pa), .prefix(xa));
  prefix_sum #(.N(NB)) dut_b (.pred(pb), .prefix(xb));
  prefix_sum #(.N(NC)) dut_c (.pred(pc), .prefix(xc));

  task automatic cmp(string tag, int j, int got, int e);
    checks++;
    if (got != e) begin
      failures++;
      $display("%s mismatch lane %0d got=%0d exp=%0d", tag, j, got, e);
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
    int sum;
    int ex [4] = '{0, 1, 1, 2};
    // Worked example: element 0 first, predicates 0,1,0,1.
    pc = 4'b1010;
    #1;
    for (int j = 0; j < NC; j++) cmp("example", j, int'(xc[j]), ex[j]);

    for (int t = 0; t < 300; t++) begin
      pa = NA'($urandom);
      pb = NB'($urandom);
      if (t == 0) begin pa = '1; pb = '1; end
      if (t == 1) begin pa = '0; pb = '0; end
      #1;
      sum = 0;
      for (int j = 0; j < NA; j++) begin sum += pa[j]; cmp("N16", j, int'(xa[j]), sum); end
      sum = 0;
      for (int j = 0; j < NB; j++) begin sum += pb[j]; cmp("N11", j, int'(xb[j]), sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
