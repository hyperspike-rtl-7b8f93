// tb_hs_rp_encoder: self-checking test of the random-projection encoder.
// A reduced encoder (16 features, D = 64, 16-bit chunks) encodes random
// feature vectors with a random bipolar projection matrix; every chunk
// taken from the output stream is compared with sign(P F) computed here
// (positive sum -> 1, zero or negative -> 0). The consumer applies random
// back-pressure so that the encoder has to hold a finished chunk; chunk
// order, q_last, and the cycle count of an unstalled query
// (D/CH chunks of NF+2 cycles, plus 1) are checked.
module tb_hs_rp_encoder;
  localparam int unsigned NF = 16, D = 64, CH = 16, NCHK = D / CH;
  localparam int unsigned PAW = $clog2(NCHK * NF), KW = $clog2(NCHK);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy;
  logic [NF-1:0] features;
  logic p_re;
  logic [PAW-1:0] p_raddr;
  logic [CH-1:0] p_rdata;
  logic q_valid, q_ready, q_last;
  logic [CH-1:0] q_chunk;
  logic [KW-1:0] q_idx;

  bit P [D][NF];                 // 1 = +1, 0 = -1
  int checks = 0, failures = 0;
  int stalls = 0;
  int bp_pct = 0;

  hs_rp_encoder #(.NF(NF), .D(D), .CH(CH)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (p_re) for (int d = 0; d < CH; d++) p_rdata[d] <= P[(p_raddr / NF) * CH + d][p_raddr % NF];

  always_ff @(posedge clk) if (q_valid && !q_ready) stalls++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [D-1:0] ref_hv(input bit [NF-1:0] f);
    bit [D-1:0] h;
    for (int d = 0; d < D; d++) begin
      int s = 0;
      for (int j = 0; j < NF; j++) if (f[j]) s += P[d][j] ? 1 : -1;
      h[d] = (s > 0);
    end
    return h;
  endfunction

  task automatic run_query(input bit [NF-1:0] f, input int bp);
    bit [D-1:0] exp_h;
    int got = 0, cyc = 0;
    bit seen_last = 0;
    for (int d = 0; d < D; d++) for (int j = 0; j < NF; j++) P[d][j] = $urandom_range(0, 1);
    exp_h = ref_hv(f);
    bp_pct = bp;
    @(negedge clk); start = 1'b1; features = f;
    @(negedge clk); start = 1'b0; features = '0;
    while (!seen_last) begin
      cyc++;
      q_ready = ($urandom_range(0, 99) >= bp_pct);
      @(posedge clk);
      if (q_valid && q_ready) begin
        checks++;
        if (q_idx != KW'(got) || q_chunk !== exp_h[got*CH +: CH] || q_last != (got == NCHK - 1)) begin
          failures++;
          $display("chunk %0d: idx %0d data %h expected %h last %b", got, q_idx, q_chunk, exp_h[got*CH +: CH], q_last);
        end
        seen_last = q_last;
        got++;
      end
      @(negedge clk);
    end
    q_ready = 1'b0;
    if (bp == 0) begin
      checks++;
      if (cyc != NCHK * (NF + 2) + 1) begin
        failures++;
        $display("unstalled query took %0d cycles, expected %0d", cyc, NCHK * (NF + 2) + 1);
      end
    end
    @(negedge clk);
    checks++; if (busy) failures++;
  endtask

  initial begin
    start = 0; features = 0; q_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_query(16'hA5C3, 0);
    run_query(16'hFFFF, 0);
    run_query(16'h0000, 0);     // no active feature: all-zero hypervector
    for (int k = 0; k < 6; k++) run_query(NF'($urandom), 70);
    $display("output stalls: %0d cycles", stalls);
    checks++; if (stalls == 0) begin failures++; $display("back-pressure never stalled the encoder"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
