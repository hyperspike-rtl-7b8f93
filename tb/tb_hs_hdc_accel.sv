// tb_hs_hdc_accel: self-checking test of the HDC inference accelerator.
// A reduced accelerator (32 features, D = 512, 64-bit chunks, 6 classes)
// is given a random bipolar projection matrix and class hypervectors
// trained here the way HDC trains: noisy samples of a per-class prototype
// feature vector are encoded, summed per class and binarised by sign.
// Noisy test queries must then be classified exactly like the reference
// nearest-class search computed here (class and distance), and mostly
// into their true class. The cycle count of a query, D/CH*(NF+2) plus
// the search tail, is checked against the formula below.
module tb_hs_hdc_accel;
  localparam int unsigned NF = 32, D = 512, CH = 64, NCLS = 6, NCHK = D / CH;
  localparam int unsigned PAW = $clog2(NCHK * NF), CAW = $clog2(NCHK * NCLS), LW = $clog2(NCLS), DSW = $clog2(D + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [NF-1:0] features;
  logic [LW:0] n_classes;
  logic [LW-1:0] class_out;
  logic [DSW-1:0] min_dist;
  logic [DSW-1:0] hdist [NCLS];
  logic p_re, c_re;
  logic [PAW-1:0] p_raddr;
  logic [CAW-1:0] c_raddr;
  logic [CH-1:0] p_rdata, c_rdata;

  bit P [D][NF];
  bit [D-1:0] C [NCLS];
  bit [NF-1:0] proto [NCLS];
  int checks = 0, failures = 0, correct = 0, total = 0;

  hs_hdc_accel #(.NF(NF), .D(D), .CH(CH), .NCLS(NCLS)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (p_re) for (int d = 0; d < CH; d++) p_rdata[d] <= P[(p_raddr / NF) * CH + d][p_raddr % NF];
    if (c_re) c_rdata <= C[c_raddr % NCLS][(c_raddr / NCLS) * CH +: CH];
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [D-1:0] encode(input bit [NF-1:0] f);
    bit [D-1:0] h;
    for (int d = 0; d < D; d++) begin
      int s = 0;
      for (int j = 0; j < NF; j++) if (f[j]) s += P[d][j] ? 1 : -1;
      h[d] = (s > 0);
    end
    return h;
  endfunction

  function automatic bit [NF-1:0] noisy(input bit [NF-1:0] f, input int nflip);
    for (int b = 0; b < nflip; b++) f[$urandom_range(0, NF - 1)] ^= 1'b1;
    return f;
  endfunction

  initial begin
    int acc [NCLS][D];
    start = 0; features = 0; n_classes = NCLS;
    for (int d = 0; d < D; d++) for (int j = 0; j < NF; j++) P[d][j] = $urandom_range(0, 1);
    for (int k = 0; k < NCLS; k++) proto[k] = $urandom;
    // training: class HV = sign(sum of bipolar sample HVs)
    for (int k = 0; k < NCLS; k++) begin
      for (int d = 0; d < D; d++) acc[k][d] = 0;
      for (int s = 0; s < 8; s++) begin
        bit [D-1:0] h;
        h = encode(noisy(proto[k], 3));
        for (int d = 0; d < D; d++) acc[k][d] += h[d] ? 1 : -1;
      end
      for (int d = 0; d < D; d++) C[k][d] = (acc[k][d] > 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int q = 0; q < 24; q++) begin
      int lbl, best, cyc, exp_cyc;
      bit [NF-1:0] f;
      bit [D-1:0] h;
      int ed [NCLS];
      lbl = q % NCLS; best = 0;
      f = noisy(proto[lbl], 4);
      h = encode(f);
      for (int k = 0; k < NCLS; k++) begin
        ed[k] = $countones(h ^ C[k]);
        if (ed[k] < ed[best]) best = k;
      end
      @(negedge clk); start = 1'b1; features = f;
      @(negedge clk); start = 1'b0; features = '0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (class_out != LW'(best) || min_dist != DSW'(ed[best])) begin
        failures++;
        $display("query %0d: class %0d dist %0d, expected %0d dist %0d", q, class_out, min_dist, best, ed[best]);
      end
      exp_cyc = NCHK * (NF + 2) + 2 * NCLS + 3;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("query took %0d cycles, expected %0d", cyc, exp_cyc); end
      total++; if (class_out == LW'(lbl)) correct++;
    end
    $display("accuracy %0d/%0d", correct, total);
    checks++; if (correct * 10 < total * 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
