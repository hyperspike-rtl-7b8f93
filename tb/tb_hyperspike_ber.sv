// tb_hyperspike_ber: bit-error-rate sweep of the HyperSpike engine, the
// robustness experiment of the published design, at reduced sizes
// (128 inputs, 64 neurons, D = 1000, 5 classes, 4 time steps).
//
// The workload is the synthetic one of tb_hyperspike_top: per class a set
// of busy input channels, an untrained random SNN layer, a random
// projection, and class hypervectors trained here from reference
// features. The whole model (weights, projection, class hypervectors) is
// then stored at each bit error rate of the sweep: 0, 0.1 % (typical) and
// 3.4 % (worst case), and finally at 3.4 % in the projection and class
// banks only, with error-free SNN weights. The same test queries are
// classified each time and the accuracy loss against the error-free
// memory is reported. Checks: error-free features equal the reference
// exactly; the number of corrupted bits is near the expected rate; the
// accuracy drops by at most 15 points at 0.1 % and by at most 10 points
// with 3.4 % errors confined to the hypervectors.
module tb_hyperspike_ber;
  import hs_pkg::*;
  localparam int unsigned NI = 128, NN = 64, L = 16, TMAX = 4;
  localparam int unsigned D = 1000, CH = 100, NCLS = 5;
  localparam int unsigned STEPS = 4, NTRAIN = 8, NTEST = 30;
  localparam int unsigned NCH = NI / L, NCHK = D / CH;
  localparam int unsigned CFG_DW = ((L * W_W) > CH) ? (L * W_W) : CH;
  localparam int unsigned TW = $clog2(TMAX + 1), LW = (NCLS <= 2) ? 1 : $clog2(NCLS), DSW = $clog2(D + 1);
  localparam longint ALPHA = 58982;        // 0.9 in Q0.16
  localparam longint UTH = 0;               // threshold, 12 fraction bits

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  bank_e cfg_bank;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [15:0] ber_thr;
  logic [31:0] flip_count;
  logic start, busy, done;
  logic [TW-1:0] n_steps;
  logic [LW:0] n_classes;
  logic [ALPHA_W-1:0] alpha;
  logic signed [ACC_W-1:0] u_th;
  logic [LW-1:0] class_out;
  logic [DSW-1:0] min_dist;
  logic [NN-1:0] features;
  logic [DSW-1:0] class_dist [NCLS];

  hyperspike_top #(.NI(NI), .NN(NN), .L(L), .TMAX(TMAX), .D(D), .CH(CH), .NCLS(NCLS)) dut (.*);

  always #5 clk = ~clk;

  // model and query held by the bench
  shortint     W [NN][NI];
  bit [NN-1:0] P [D];               // P[d][j]: 1 = +1, 0 = -1
  bit [D-1:0]  C [NCLS];
  bit [NI-1:0] busy_ch [NCLS];      // class-specific busy input channels
  bit [NI-1:0] S_in [TMAX];

  int checks = 0, failures = 0;
  longint n_spikes = 0, n_resets = 0;
  int class_hits [NCLS];

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic bit [NN-1:0] ref_snn(input int steps);
    longint p [NI];
    longint r [NN], u [NN];
    bit [NN-1:0] s = '0;
    for (int j = 0; j < NI; j++) p[j] = 0;
    for (int i = 0; i < NN; i++) begin r[i] = 0; u[i] = 0; end
    for (int t = 0; t < steps; t++) begin
      for (int j = 0; j < NI; j++) begin
        p[j] = ((p[j] * ALPHA) >>> 16) + (S_in[t][j] ? 4096 : 0);
        if (p[j] > 65535) p[j] = 65535;
      end
      for (int i = 0; i < NN; i++) begin
        longint acc = 0;
        if (s[i]) n_resets++;
        r[i] = ((r[i] + (s[i] ? u[i] : 0)) * ALPHA) >>> 16;
        for (int j = 0; j < NI; j++) acc += longint'(W[i][j]) * p[j];
        u[i] = acc - r[i];
        s[i] = (u[i] >= UTH);
        if (s[i]) n_spikes++;
      end
    end
    return s;
  endfunction

  function automatic bit [D-1:0] ref_encode(input bit [NN-1:0] f);
    bit [D-1:0] h;
    for (int d = 0; d < D; d++) begin
      int s = 0;
      for (int j = 0; j < NN; j++) if (f[j]) s += P[d][j] ? 1 : -1;
      h[d] = (s > 0);
    end
    return h;
  endfunction

  // spike frames of one sample of class k: busy channels fire at 60 %, others at 3 %
  task automatic make_sample(input int k);
    for (int t = 0; t < TMAX; t++)
      for (int j = 0; j < NI; j++)
        S_in[t][j] = ($urandom_range(0, 99) < (busy_ch[k][j] ? 60 : 3));
  endtask

  // ---------------- load port ----------------
  task automatic cfg_write(input bank_e b, input int a, input logic [CFG_DW-1:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_bank = b; cfg_addr = CFG_AW'(a); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic load_model();
    for (int i = 0; i < NN; i++)
      for (int c = 0; c < NCH; c++) begin
        logic [CFG_DW-1:0] w = '0;
        for (int l = 0; l < L; l++) w[l*W_W +: W_W] = W[i][c*L + l];
        cfg_write(BANK_WEIGHT, i * NCH + c, w);
      end
    for (int c = 0; c < NCHK; c++)
      for (int j = 0; j < NN; j++) begin
        logic [CFG_DW-1:0] w = '0;
        for (int d = 0; d < CH; d++) w[d] = P[c*CH + d][j];
        cfg_write(BANK_PROJ, c * NN + j, w);
      end
    for (int c = 0; c < NCHK; c++)
      for (int k = 0; k < NCLS; k++)
        cfg_write(BANK_CLASS, c * NCLS + k, CFG_DW'(C[k][c*CH +: CH]));
  endtask

  task automatic load_query();
    for (int t = 0; t < TMAX; t++)
      for (int c = 0; c < NCH; c++)
        cfg_write(BANK_INPUT, t * NCH + c, CFG_DW'(S_in[t][c*L +: L]));
  endtask

  task automatic run(output int cyc);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int acc [NCLS][D];
    int correct, cyc, exp_cyc;
    cfg_we = 0; cfg_bank = BANK_WEIGHT; cfg_addr = 0; cfg_wdata = 0; ber_thr = 0;
    start = 0; n_steps = TW'(STEPS); n_classes = (LW+1)'(NCLS); alpha = ALPHA_W'(ALPHA); u_th = ACC_W'(UTH);
    for (int k = 0; k < NCLS; k++) class_hits[k] = 0;

    // random untrained SNN layer, random projection, class rate maps
    for (int i = 0; i < NN; i++) for (int j = 0; j < NI; j++) W[i][j] = shortint'($urandom_range(0, 8000)) - 16'sd4000;
    for (int d = 0; d < D; d++) for (int j = 0; j < NN; j++) P[d][j] = $urandom_range(0, 1);
    for (int k = 0; k < NCLS; k++) for (int j = 0; j < NI; j++) busy_ch[k][j] = ($urandom_range(0, 3) == 0);

    // HDC training on reference features
    for (int k = 0; k < NCLS; k++) begin
      for (int d = 0; d < D; d++) acc[k][d] = 0;
      for (int s = 0; s < NTRAIN; s++) begin
        bit [D-1:0] h;
        make_sample(k);
        h = ref_encode(ref_snn(STEPS));
        for (int d = 0; d < D; d++) acc[k][d] += h[d] ? 1 : -1;
      end
      for (int d = 0; d < D; d++) C[k][d] = (acc[k][d] > 0);
    end
    n_spikes = 0; n_resets = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    load_model();

    // ---- sweep over bit error rates ----
    begin
      int thr [4];
      int acc_pct [4];
      longint bits_model;
      bit [NN-1:0] fref [NTEST];
      int kq [NTEST];
      bit [NI-1:0] frames [NTEST][TMAX];
      thr[0] = 0; thr[1] = 66; thr[2] = 2228; thr[3] = 2228;
      bits_model = longint'(NN * NI) * W_W + longint'(D) * NN + longint'(D) * NCLS;
      for (int q = 0; q < NTEST; q++) begin
        kq[q] = q % NCLS;
        make_sample(kq[q]);
        for (int t = 0; t < TMAX; t++) frames[q][t] = S_in[t];
        fref[q] = ref_snn(STEPS);
      end
      for (int r = 0; r < 4; r++) begin
        int unsigned fc0;
        real expect_flips;
        fc0 = flip_count;
        if (r < 3) begin
          ber_thr = 16'(thr[r]);
          load_model();
        end else begin
          // last run: error-free SNN weights, errors only in the HDC banks
          ber_thr = 16'd0;
          load_model();
          fc0 = flip_count;
          ber_thr = 16'(thr[r]);
          for (int c = 0; c < NCHK; c++)
            for (int j = 0; j < NN; j++) begin
              logic [CFG_DW-1:0] w = '0;
              for (int d = 0; d < CH; d++) w[d] = P[c*CH + d][j];
              cfg_write(BANK_PROJ, c * NN + j, w);
            end
          for (int c = 0; c < NCHK; c++)
            for (int k = 0; k < NCLS; k++)
              cfg_write(BANK_CLASS, c * NCLS + k, CFG_DW'(C[k][c*CH +: CH]));
        end
        ber_thr = 16'd0;
        if (r > 0) begin
          expect_flips = real'((r == 3) ? longint'(D) * (NN + NCLS) : bits_model) * thr[r] / 65535.0;
          checks++;
          if (real'(flip_count - fc0) < 0.7 * expect_flips || real'(flip_count - fc0) > 1.3 * expect_flips) begin
            failures++;
            $display("BER %0d/65535: %0d bits corrupted, expected about %0.0f", thr[r], flip_count - fc0, expect_flips);
          end
        end
        correct = 0;
        for (int q = 0; q < NTEST; q++) begin
          for (int t = 0; t < TMAX; t++) S_in[t] = frames[q][t];
          load_query();
          run(cyc);
          if (r == 0) begin
            checks++;
            if (features !== fref[q]) failures++;
          end
          if (class_out == LW'(kq[q])) correct++;
        end
        acc_pct[r] = correct * 100 / NTEST;
        $display("%s BER %0.2f %%: accuracy %0d %% (%0d/%0d), %0d bits corrupted",
                 (r == 3) ? "HDC banks only," : "whole model,", 100.0 * thr[r] / 65535.0, acc_pct[r], correct, NTEST, flip_count - fc0);
      end
      $display("accuracy loss: %0d points at 0.1 %%, %0d points at 3.4 %%, %0d points at 3.4 %% in the HDC banks only",
               acc_pct[0] - acc_pct[1], acc_pct[0] - acc_pct[2], acc_pct[0] - acc_pct[3]);
      checks++; if (acc_pct[0] < 80) begin failures++; $display("error-free accuracy too low"); end
      checks++; if (acc_pct[0] - acc_pct[3] > 10) begin failures++; $display("HDC banks lost too much accuracy at 3.4 %%"); end
      checks++; if (acc_pct[0] - acc_pct[1] > 15) begin failures++; $display("0.1 %% BER lost too much accuracy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
