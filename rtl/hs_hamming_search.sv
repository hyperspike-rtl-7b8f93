// hs_hamming_search: associative search of the HDC classifier.
//
// Compares the binary query hypervector with every stored class
// hypervector by Hamming distance (XOR, then count of the mismatching
// bits) and reports the class with the fewest mismatches, as in the
// published design. Its own choices: the query arrives in chunks of CH
// bits; distances are accumulated chunk by chunk, one class per cycle;
// the minimum is found by a sequential scan in which the lowest class
// index wins a tie.
//
// Operation: start (while idle) clears the distances and latches
// n_classes (1..NCLS). Each chunk accepted on the q_* stream (q_ready is
// high while the unit waits for one) is compared with class words
// c*NCLS + k, k = 0..n_classes-1, of the class bank: n_classes+1 cycles
// per chunk. After the chunk flagged q_last, a scan of n_classes+1 cycles
// finds the minimum; done then pulses for one cycle with class_out and
// min_dist, which hold until the next start. hdist[k] may be read then.
module hs_hamming_search
  import hs_pkg::*;
#(
  parameter int unsigned D    = hs_pkg::HV_D,
  parameter int unsigned CH   = hs_pkg::HV_CHUNK,
  parameter int unsigned NCLS = hs_pkg::N_CLASS,
  parameter int unsigned NCHK = D / CH,
  parameter int unsigned CAW  = clog2_min1(NCHK * NCLS),
  parameter int unsigned KW   = clog2_min1(NCHK),
  parameter int unsigned LW   = clog2_min1(NCLS),
  parameter int unsigned DSW  = $clog2(D + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [LW:0]    n_classes,
  output logic           busy,
  // query chunk stream
  input  logic           q_valid,
  output logic           q_ready,
  input  logic [CH-1:0]  q_chunk,
  input  logic [KW-1:0]  q_idx,
  input  logic           q_last,
  // class bank read port (1-cycle latency)
  output logic           c_re,
  output logic [CAW-1:0] c_raddr,
  input  logic [CH-1:0]  c_rdata,
  // result
  output logic           done,
  output logic [LW-1:0]  class_out,
  output logic [DSW-1:0] min_dist,
  output logic [DSW-1:0] hdist [NCLS]
);

  localparam int unsigned PCW = $clog2(CH + 1);

  typedef enum logic [1:0] {H_IDLE, H_WAIT, H_CMP, H_MIN} state_e;
  state_e state;

  logic [LW:0]    ncls_q;
  logic [CH-1:0]  qbuf;
  logic [KW-1:0]  qk;
  logic           qlast;
  logic [LW-1:0]  k_iss;
  logic           iss_on;
  logic           d_v;
  logic [LW-1:0]  d_k;
  logic [PCW-1:0] mism;

  // XOR and mismatch count of one chunk against one class word
  always_comb begin
    logic [CH-1:0] x;
    x    = qbuf ^ c_rdata;
    mism = '0;
    for (int unsigned b = 0; b < CH; b++) mism = mism + PCW'(x[b]);
  end

  wire [LW-1:0] k_max = LW'(ncls_q - 1);

  assign busy    = (state != H_IDLE);
  assign q_ready = (state == H_WAIT);
  assign c_re    = (state == H_CMP) && iss_on;
  assign c_raddr = CAW'(qk) * CAW'(NCLS) + CAW'(k_iss);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= H_IDLE;
      ncls_q    <= '0;
      qbuf      <= '0;
      qk        <= '0;
      qlast     <= 1'b0;
      k_iss     <= '0;
      iss_on    <= 1'b0;
      d_v       <= 1'b0;
      d_k       <= '0;
      done      <= 1'b0;
      class_out <= '0;
      min_dist  <= '0;
      for (int unsigned k = 0; k < NCLS; k++) hdist[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        H_IDLE: begin
          if (start) begin
            ncls_q <= (n_classes == '0) ? (LW+1)'(1) :
                      (n_classes > (LW+1)'(NCLS)) ? (LW+1)'(NCLS) : n_classes;
            for (int unsigned k = 0; k < NCLS; k++) hdist[k] <= '0;
            state <= H_WAIT;
          end
        end

        H_WAIT: begin
          if (q_valid) begin
            qbuf   <= q_chunk;
            qk     <= q_idx;
            qlast  <= q_last;
            k_iss  <= '0;
            iss_on <= 1'b1;
            state  <= H_CMP;
          end
        end

        H_CMP: begin
          d_v <= iss_on;
          d_k <= k_iss;
          if (iss_on) begin
            if (k_iss == k_max) iss_on <= 1'b0;
            else                k_iss  <= k_iss + LW'(1);
          end
          if (d_v) begin
            hdist[d_k] <= hdist[d_k] + DSW'(mism);
            if (d_k == k_max) begin
              d_v <= 1'b0;
              if (qlast) begin
                k_iss     <= '0;
                class_out <= '0;
                min_dist  <= '1;
                state     <= H_MIN;
              end else begin
                state <= H_WAIT;
              end
            end
          end
        end

        H_MIN: begin
          if (hdist[k_iss] < min_dist) begin
            min_dist  <= hdist[k_iss];
            class_out <= k_iss;
          end
          if (k_iss == k_max) begin
            done  <= 1'b1;
            state <= H_IDLE;
          end else begin
            k_iss <= k_iss + LW'(1);
          end
        end

        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
