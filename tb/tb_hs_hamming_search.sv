// tb_hs_hamming_search: self-checking test of the Hamming-distance search.
// A reduced unit (D = 64, 16-bit chunks, up to 5 classes) receives query
// chunks from this bench and reads class words from a memory model. Per
// query the distance to every class, the minimum and the winning class
// (lowest index on a tie) are compared with values computed here; the
// number of classes in use is varied. Queries built near a chosen class,
// a forced tie, and the cycle count with chunks always available
// (D/CH*(n+1) + n + 4 after the first chunk is offered) are checked.
module tb_hs_hamming_search;
  localparam int unsigned D = 64, CH = 16, NCLS = 5, NCHK = D / CH;
  localparam int unsigned CAW = $clog2(NCHK * NCLS), KW = $clog2(NCHK), LW = $clog2(NCLS), DSW = $clog2(D + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [LW:0] n_classes;
  logic q_valid, q_ready, q_last;
  logic [CH-1:0] q_chunk;
  logic [KW-1:0] q_idx;
  logic c_re;
  logic [CAW-1:0] c_raddr;
  logic [CH-1:0] c_rdata;
  logic [LW-1:0] class_out;
  logic [DSW-1:0] min_dist;
  logic [DSW-1:0] hdist [NCLS];

  bit [D-1:0] C [NCLS];
  int checks = 0, failures = 0, ties = 0;

  hs_hamming_search #(.D(D), .CH(CH), .NCLS(NCLS)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (c_re) c_rdata <= C[c_raddr % NCLS][(c_raddr / NCLS) * CH +: CH];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_query(input bit [D-1:0] q, input int n);
    int ed [NCLS];
    int best = 0, cyc = 0;
    for (int k = 0; k < n; k++) begin
      ed[k] = $countones(q ^ C[k]);
      if (ed[k] < ed[best]) best = k;
    end
    for (int k = 0; k < n; k++) if (k != best && ed[k] == ed[best]) begin ties++; break; end
    @(negedge clk); start = 1'b1; n_classes = (LW+1)'(n);
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < NCHK; c++) begin
      q_valid = 1'b1; q_chunk = q[c*CH +: CH]; q_idx = KW'(c); q_last = (c == NCHK - 1);
      @(posedge clk); while (!q_ready) begin @(posedge clk); cyc++; end
      cyc++;
      @(negedge clk); q_valid = 1'b0;
    end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (class_out != LW'(best) || min_dist != DSW'(ed[best])) begin
      failures++;
      $display("n=%0d: class %0d dist %0d, expected %0d dist %0d", n, class_out, min_dist, best, ed[best]);
    end
    for (int k = 0; k < n; k++) begin
      checks++;
      if (hdist[k] != DSW'(ed[k])) begin failures++; $display("class %0d distance %0d expected %0d", k, hdist[k], ed[k]); end
    end
    checks++;
    if (cyc != NCHK * (n + 1) + n + 4) begin
      failures++;
      $display("n=%0d: %0d cycles, expected %0d", n, cyc, NCHK * (n + 1) + n + 4);
    end
  endtask

  initial begin
    bit [D-1:0] q;
    start = 0; n_classes = 0; q_valid = 0; q_chunk = 0; q_idx = 0; q_last = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int rep = 0; rep < 20; rep++) begin
      int tgt;
      for (int k = 0; k < NCLS; k++) C[k] = {$urandom, $urandom};
      tgt = $urandom_range(0, NCLS - 1);
      q = C[tgt];
      for (int b = 0; b < 10; b++) q[$urandom_range(0, D - 1)] ^= 1'b1;
      run_query(q, NCLS);
      run_query({$urandom, $urandom}, $urandom_range(1, NCLS));
    end
    // forced tie between classes 1 and 3: lowest index must win
    C[0] = '1; C[1] = 64'h0000_0000_0000_00FF; C[2] = '1; C[3] = 64'hFF00_0000_0000_0000; C[4] = '1;
    run_query('0, NCLS);
    checks++; if (class_out != 1) failures++;
    checks++; if (ties == 0) failures++;
    $display("queries with tied minimum: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
