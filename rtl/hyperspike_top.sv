// hyperspike_top: HyperSpike inference engine, a single randomly weighted
// spiking layer used as feature extractor in front of a trained binary
// hyperdimensional (HDC) classifier.
//
// Structure (as in the published design): (A) a parameter memory that
// holds the query and all model parameters and may corrupt stored bits,
// (B) the spiking layer, (C) the HDC accelerator. Data flow of one query:
// the input spike frames of all time steps and the model are written
// through the cfg_* port into the memory banks; start runs the LIF layer
// over n_steps time steps; the spike vector of the last step is the
// feature vector; it is encoded into a 10,000-bit hypervector and the
// nearest class hypervector (Hamming distance) is reported.
//
// Memory (A) is four banks (hs_param_mem), selected by cfg_bank:
//   BANK_WEIGHT  N_NEUR*N_IN/LANES words of LANES*16 bits
//   BANK_INPUT   T_MAX*N_IN/LANES  words of LANES bits
//   BANK_PROJ    (D/CHUNK)*N_NEUR  words of CHUNK bits
//   BANK_CLASS   (D/CHUNK)*N_CLASS words of CHUNK bits
// The word layouts are given in hs_lif_layer and hs_hdc_accel. A word is
// taken from the low bits of cfg_wdata. ber_thr sets the bit error rate
// of the memory (flips per written bit = ber_thr/65535); flip_count counts
// the bits it has corrupted. Splitting the memory into banks, the write
// port and the controller below are this design's choices.
//
// Timing: done pulses one cycle after the HDC accelerator finishes. From
// the start cycle to done a query takes exactly
//   n_steps*((NN+1)*NI/L + 2) + 2 + (D/CH)*(NN+2) + 2*n_classes + 5
// cycles, at the defaults n_steps*41122 + 5167 + 2*n_classes. The load
// port must not be written while busy.
module hyperspike_top
  import hs_pkg::*;
#(
  parameter int unsigned NI     = hs_pkg::N_IN,
  parameter int unsigned NN     = hs_pkg::N_NEUR,
  parameter int unsigned L      = hs_pkg::LANES,
  parameter int unsigned TMAX   = hs_pkg::T_MAX,
  parameter int unsigned D      = hs_pkg::HV_D,
  parameter int unsigned CH     = hs_pkg::HV_CHUNK,
  parameter int unsigned NCLS   = hs_pkg::N_CLASS,
  parameter int unsigned CFG_DW = ((L * W_W) > CH) ? (L * W_W) : CH,
  parameter int unsigned TW     = $clog2(TMAX + 1),
  parameter int unsigned LW     = clog2_min1(NCLS),
  parameter int unsigned DSW    = $clog2(D + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // model / query load port
  input  logic                    cfg_we,
  input  bank_e                   cfg_bank,
  input  logic [CFG_AW-1:0]       cfg_addr,
  input  logic [CFG_DW-1:0]       cfg_wdata,
  input  logic [15:0]             ber_thr,
  output logic [31:0]             flip_count,
  // query control
  input  logic                    start,
  input  logic [TW-1:0]           n_steps,
  input  logic [LW:0]             n_classes,
  input  logic [ALPHA_W-1:0]      alpha,
  input  logic signed [ACC_W-1:0] u_th,
  output logic                    busy,
  output logic                    done,
  output logic [LW-1:0]           class_out,
  output logic [DSW-1:0]          min_dist,
  output logic [NN-1:0]           features,
  output logic [DSW-1:0]          class_dist [NCLS]  // Hamming distance to every class
);

  localparam int unsigned NCH   = NI / L;
  localparam int unsigned NCHK  = D / CH;
  localparam int unsigned W_DEP = NN * NCH;
  localparam int unsigned I_DEP = TMAX * NCH;
  localparam int unsigned P_DEP = NCHK * NN;
  localparam int unsigned C_DEP = NCHK * NCLS;
  localparam int unsigned WAW   = clog2_min1(W_DEP);
  localparam int unsigned IAW   = clog2_min1(I_DEP);
  localparam int unsigned PAW   = clog2_min1(P_DEP);
  localparam int unsigned CAW   = clog2_min1(C_DEP);

  // ---------------- (A) parameter memory ----------------
  logic             w_re, in_re, p_re, c_re;
  logic [WAW-1:0]   w_raddr;
  logic [IAW-1:0]   in_raddr;
  logic [PAW-1:0]   p_raddr;
  logic [CAW-1:0]   c_raddr;
  logic [L*W_W-1:0] w_rdata;
  logic [L-1:0]     in_rdata;
  logic [CH-1:0]    p_rdata, c_rdata;
  logic [31:0]      fc_w, fc_i, fc_p, fc_c;

  hs_param_mem #(.DW(L*W_W), .DEPTH(W_DEP), .SEED(16'hACE1)) u_mem_weight (
    .clk, .rst_n, .ber_thr,
    .we(cfg_we && cfg_bank == BANK_WEIGHT), .waddr(WAW'(cfg_addr)), .wdata(cfg_wdata[L*W_W-1:0]),
    .re(w_re), .raddr(w_raddr), .rdata(w_rdata), .flip_count(fc_w));

  hs_param_mem #(.DW(L), .DEPTH(I_DEP), .SEED(16'h1D2B)) u_mem_input (
    .clk, .rst_n, .ber_thr,
    .we(cfg_we && cfg_bank == BANK_INPUT), .waddr(IAW'(cfg_addr)), .wdata(cfg_wdata[L-1:0]),
    .re(in_re), .raddr(in_raddr), .rdata(in_rdata), .flip_count(fc_i));

  hs_param_mem #(.DW(CH), .DEPTH(P_DEP), .SEED(16'h5A3C)) u_mem_proj (
    .clk, .rst_n, .ber_thr,
    .we(cfg_we && cfg_bank == BANK_PROJ), .waddr(PAW'(cfg_addr)), .wdata(cfg_wdata[CH-1:0]),
    .re(p_re), .raddr(p_raddr), .rdata(p_rdata), .flip_count(fc_p));

  hs_param_mem #(.DW(CH), .DEPTH(C_DEP), .SEED(16'hC3E7)) u_mem_class (
    .clk, .rst_n, .ber_thr,
    .we(cfg_we && cfg_bank == BANK_CLASS), .waddr(CAW'(cfg_addr)), .wdata(cfg_wdata[CH-1:0]),
    .re(c_re), .raddr(c_raddr), .rdata(c_rdata), .flip_count(fc_c));

  assign flip_count = fc_w + fc_i + fc_p + fc_c;

  // ---------------- controller ----------------
  typedef enum logic [1:0] {T_IDLE, T_SNN, T_HDC} state_e;
  state_e state;
  logic   snn_start, snn_busy, snn_done;
  logic   hdc_start, hdc_busy, hdc_done;
  logic [LW:0] ncls_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      snn_start <= 1'b0;
      hdc_start <= 1'b0;
      ncls_q    <= '0;
      done      <= 1'b0;
    end else begin
      snn_start <= 1'b0;
      hdc_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          ncls_q    <= n_classes;
          snn_start <= 1'b1;
          state     <= T_SNN;
        end
        T_SNN: if (snn_done) begin
          hdc_start <= 1'b1;
          state     <= T_HDC;
        end
        T_HDC: if (hdc_done) begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = (state != T_IDLE) || snn_busy || hdc_busy;

  // ---------------- (B) spiking layer ----------------
  hs_lif_layer #(.NI(NI), .NN(NN), .L(L), .TMAX(TMAX)) u_snn (
    .clk, .rst_n,
    .start  (snn_start),
    .n_steps(n_steps),
    .alpha  (alpha),
    .u_th   (u_th),
    .busy   (snn_busy),
    .done   (snn_done),
    .spikes (features),
    .w_re, .w_raddr, .w_rdata,
    .in_re, .in_raddr, .in_rdata
  );

  // ---------------- (C) HDC accelerator ----------------
  hs_hdc_accel #(.NF(NN), .D(D), .CH(CH), .NCLS(NCLS)) u_hdc (
    .clk, .rst_n,
    .start    (hdc_start),
    .features (features),
    .n_classes(ncls_q),
    .busy     (hdc_busy),
    .done     (hdc_done),
    .class_out(class_out),
    .min_dist (min_dist),
    .hdist    (class_dist),
    .p_re, .p_raddr, .p_rdata,
    .c_re, .c_raddr, .c_rdata
  );

endmodule
