// tb_hyperspike_top: end-to-end test of the HyperSpike engine at reduced
// sizes (128 inputs, 64 neurons, 16 lanes, D = 512, 64-bit chunks,
// 5 classes, 4 time steps).
//
// The bench draws a random, untrained weight matrix and a random bipolar
// projection, and per class a spike-rate map (a class-specific set of
// busy input channels). Class hypervectors are trained here: sample
// queries of each class go through a reference model of the LIF layer
// and the encoder, and their bipolar hypervectors are summed and
// binarised. Everything is written through the load port. Test queries
// then run on the engine; with an ideal memory the final spike vector,
// the Hamming distance to every class and the chosen class must equal the
// reference exactly, and the query must take the predicted number of
// cycles. A second pass reloads the model into a memory with a 1 % bit
// error rate and runs the queries again. Counted mechanisms, each of
// which must occur: neuron spikes, post-spike resets, bit errors written
// into the memory, and correct classification of every class.
module tb_hyperspike_top;
  import hs_pkg::*;
  localparam int unsigned NI = 128, NN = 64, L = 16, TMAX = 4;
  localparam int unsigned D = 512, CH = 64, NCLS = 5;
  localparam int unsigned STEPS = 4, NTRAIN = 8, NTEST = 20;
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

    // ---- pass 1: ideal memory, bit-exact against the reference ----
    correct = 0;
    for (int q = 0; q < NTEST; q++) begin
      int k, best;
      bit [NN-1:0] f;
      bit [D-1:0] h;
      int ed [NCLS];
      k = q % NCLS; best = 0;
      make_sample(k);
      f = ref_snn(STEPS);
      h = ref_encode(f);
      for (int c = 0; c < NCLS; c++) begin
        ed[c] = $countones(h ^ C[c]);
        if (ed[c] < ed[best]) best = c;
      end
      load_query();
      run(cyc);
      checks++;
      if (features !== f) begin failures++; $display("query %0d: features %h expected %h", q, features, f); end
      checks++;
      if (class_out != LW'(best) || min_dist != DSW'(ed[best])) begin
        failures++;
        $display("query %0d: class %0d dist %0d expected %0d dist %0d", q, class_out, min_dist, best, ed[best]);
      end
      for (int c = 0; c < NCLS; c++) begin
        checks++;
        if (class_dist[c] != DSW'(ed[c])) failures++;
      end
      exp_cyc = STEPS * ((NN + 1) * NCH + 2) + 2 + NCHK * (NN + 2) + 2 * NCLS + 3 + 2;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("query %0d took %0d cycles, expected %0d", q, cyc, exp_cyc); end
      if (class_out == LW'(k)) begin correct++; class_hits[k]++; end
    end
    $display("ideal memory: %0d/%0d queries in their true class", correct, NTEST);
    checks++; if (flip_count != 0) failures++;

    // ---- pass 2: model stored with a 1 % bit error rate ----
    ber_thr = 16'd655;
    load_model();
    ber_thr = 16'd0;
    $display("bits corrupted in memory: %0d", flip_count);
    correct = 0;
    for (int q = 0; q < NTEST; q++) begin
      int k;
      k = q % NCLS;
      make_sample(k);
      load_query();
      run(cyc);
      if (class_out == LW'(k)) correct++;
    end
    $display("1%% BER memory: %0d/%0d queries in their true class", correct, NTEST);
    checks++; if (correct * NCLS <= NTEST) begin failures++; $display("no better than chance under bit errors"); end

    $display("mechanisms: spikes=%0d resets=%0d bit_errors=%0d", n_spikes, n_resets, flip_count);
    checks++; if (n_spikes == 0) begin failures++; $display("no spike occurred"); end
    checks++; if (n_resets == 0) begin failures++; $display("no post-spike reset occurred"); end
    checks++; if (flip_count == 0) begin failures++; $display("no bit error was injected"); end
    for (int k = 0; k < NCLS; k++) begin
      checks++;
      if (class_hits[k] == 0) begin failures++; $display("class %0d never recognised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
