// tb_hs_lif_layer: self-checking test of the LIF spiking layer.
// A reduced layer (32 inputs, 8 neurons, 4 lanes) runs three queries of
// random weights and input spikes against a reference model of the
// neuron equations written with 64-bit integers:
//   P <- floor(alpha*P/2^16) + 4096*S_in   (saturating at 65535)
//   R <- floor(alpha*(R + U*S)/2^16)
//   U <- sum W*P - R,   S <- U >= U_th
// The spike vector after every query, the number of cycles per query,
// and that spikes and post-spike resets both occurred are checked. A
// query with n_steps = 0 must finish at once with no spikes.
module tb_hs_lif_layer;
  import hs_pkg::*;
  localparam int unsigned NI = 32, NN = 8, L = 4, TMAX = 4;
  localparam int unsigned NCH = NI / L;
  localparam int unsigned WAW = $clog2(NN * NCH), IAW = $clog2(TMAX * NCH), TW = $clog2(TMAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [TW-1:0] n_steps;
  logic [ALPHA_W-1:0] alpha;
  logic signed [ACC_W-1:0] u_th;
  logic [NN-1:0] spikes;
  logic w_re, in_re;
  logic [WAW-1:0] w_raddr;
  logic [IAW-1:0] in_raddr;
  logic [L*W_W-1:0] w_rdata;
  logic [L-1:0] in_rdata;

  logic signed [15:0] W [NN][NI];
  bit              S_in [TMAX][NI];
  int checks = 0, failures = 0;
  int n_spikes = 0, n_resets = 0;

  hs_lif_layer #(.NI(NI), .NN(NN), .L(L), .TMAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  // memory models, one cycle of read latency
  always_ff @(posedge clk) begin
    if (w_re) for (int l = 0; l < L; l++) w_rdata[l*W_W +: W_W] <= W[w_raddr / NCH][(w_raddr % NCH) * L + l];
    if (in_re) for (int l = 0; l < L; l++) in_rdata[l] <= S_in[in_raddr / NCH][(in_raddr % NCH) * L + l];
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [NN-1:0] reference(input int steps, input longint a, input longint th);
    longint p [NI];
    longint r [NN], u [NN];
    bit     s [NN];
    bit [NN-1:0] res;
    for (int j = 0; j < NI; j++) p[j] = 0;
    for (int i = 0; i < NN; i++) begin r[i] = 0; u[i] = 0; s[i] = 0; end
    for (int t = 0; t < steps; t++) begin
      for (int j = 0; j < NI; j++) begin
        p[j] = ((p[j] * a) >>> 16) + (S_in[t][j] ? 4096 : 0);
        if (p[j] > 65535) p[j] = 65535;
      end
      for (int i = 0; i < NN; i++) begin
        longint acc;
        if (s[i]) n_resets++;
        r[i] = ((r[i] + (s[i] ? u[i] : 0)) * a) >>> 16;
        acc = 0;
        for (int j = 0; j < NI; j++) acc += longint'(W[i][j]) * p[j];
        u[i] = acc - r[i];
        s[i] = (u[i] >= th);
        if (s[i]) n_spikes++;
      end
    end
    for (int i = 0; i < NN; i++) res[i] = s[i];
    return res;
  endfunction

  task automatic run_query(input int steps, input int density, input int wbias);
    bit [NN-1:0] exp_s;
    int cyc, exp_cyc;
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NI; j++)
        W[i][j] = 16'($signed($urandom_range(0, 8000)) - 4000 + wbias * (i % 2));
    for (int t = 0; t < TMAX; t++)
      for (int j = 0; j < NI; j++) S_in[t][j] = ($urandom_range(0, 99) < density);
    exp_s = reference(steps, longint'(alpha), longint'(u_th));
    @(negedge clk); start = 1'b1; n_steps = TW'(steps);
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (spikes !== exp_s) begin
      failures++;
      $display("query steps=%0d: spikes %b expected %b", steps, spikes, exp_s);
    end
    exp_cyc = steps * ((NN + 1) * NCH + 2) + 1;
    if (steps == 0) exp_cyc = 1;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("query steps=%0d took %0d cycles, expected %0d", steps, cyc, exp_cyc);
    end
    @(negedge clk);
    checks++; if (busy) failures++;
  endtask

  initial begin
    start = 0; n_steps = 0; alpha = 16'd52429; u_th = 48'sd4000000;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_query(4, 40, 1500);
    run_query(3, 60, 1000);
    alpha = 16'd60000; u_th = 48'sd2000000;
    run_query(4, 30, 2000);
    run_query(1, 50, 3000);
    run_query(0, 50, 0);
    checks++; if (spikes !== '0) failures++;
    $display("spikes %0d, post-spike resets %0d", n_spikes, n_resets);
    checks++; if (n_spikes == 0) begin failures++; $display("no spike ever occurred"); end
    checks++; if (n_resets == 0) begin failures++; $display("no reset ever occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
