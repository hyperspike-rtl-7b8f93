// hs_rp_encoder: random-projection encoder of the HDC classifier.
//
// Maps the binary feature vector F (the spike vector of the SNN layer) to
// a binary query hypervector H = sign(P F), where P is a D x NF matrix of
// bipolar (+1/-1) entries held in the projection bank. Random projection
// and binarisation follow the published design. Its own choices: a stored
// bit 1 means +1 and 0 means -1; a dimension whose sum is zero or negative
// becomes 0, a positive sum becomes 1; the hypervector is produced in
// chunks of CH dimensions, one chunk per pass over the features.
//
// Operation: start (while idle) samples features. For chunk c = 0..D/CH-1
// the encoder reads projection word c*NF + j for j = 0..NF-1 (bit d of the
// word is P[c*CH+d][j]) and adds +1/-1 into CH signed counters for every
// active feature. A chunk takes NF+2 cycles; it is then offered on the
// q_* valid/ready stream (q_idx = c, q_last on the final chunk). The next
// chunk is computed while the previous one waits to be taken; the encoder
// stalls only when a finished chunk finds the output still occupied.
module hs_rp_encoder
  import hs_pkg::*;
#(
  parameter int unsigned NF   = hs_pkg::N_NEUR,
  parameter int unsigned D    = hs_pkg::HV_D,
  parameter int unsigned CH   = hs_pkg::HV_CHUNK,
  parameter int unsigned NCHK = D / CH,
  parameter int unsigned PAW  = clog2_min1(NCHK * NF),
  parameter int unsigned KW   = clog2_min1(NCHK)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NF-1:0]  features,
  output logic           busy,
  // projection bank read port (1-cycle latency)
  output logic           p_re,
  output logic [PAW-1:0] p_raddr,
  input  logic [CH-1:0]  p_rdata,
  // query hypervector chunk stream
  output logic           q_valid,
  input  logic           q_ready,
  output logic [CH-1:0]  q_chunk,
  output logic [KW-1:0]  q_idx,
  output logic           q_last
);

  localparam int unsigned JW = clog2_min1(NF);
  localparam int unsigned SW = $clog2(NF + 1) + 1;   // signed counter width

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_HOLD} state_e;
  state_e state;

  logic [NF-1:0]        feat_q;
  logic [JW-1:0]        j_iss;
  logic                 iss_on;
  logic                 d_v;
  logic [JW-1:0]        d_j;
  logic [KW-1:0]        chunk;
  logic signed [SW-1:0] cnt [CH];
  logic [CH-1:0]        sign_bits;

  wire out_free = !q_valid || q_ready;
  wire last_chunk = (chunk == KW'(NCHK - 1));

  always_comb begin
    for (int unsigned d = 0; d < CH; d++) sign_bits[d] = (cnt[d] > 0);
  end

  assign busy    = (state != E_IDLE) || q_valid;
  assign p_re    = (state == E_RUN) && iss_on;
  assign p_raddr = PAW'(chunk) * PAW'(NF) + PAW'(j_iss);

  // a chunk on the stream must stay put until it is taken
  a_q_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             q_valid && !q_ready |=> q_valid && $stable(q_chunk) && $stable(q_idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      feat_q  <= '0;
      j_iss   <= '0;
      iss_on  <= 1'b0;
      d_v     <= 1'b0;
      d_j     <= '0;
      chunk   <= '0;
      q_valid <= 1'b0;
      q_chunk <= '0;
      q_idx   <= '0;
      q_last  <= 1'b0;
      for (int unsigned d = 0; d < CH; d++) cnt[d] <= '0;
    end else begin
      if (q_valid && q_ready) q_valid <= 1'b0;
      unique case (state)
        E_IDLE: begin
          if (start && !q_valid) begin
            feat_q <= features;
            chunk  <= '0;
            j_iss  <= '0;
            iss_on <= 1'b1;
            state  <= E_RUN;
            for (int unsigned d = 0; d < CH; d++) cnt[d] <= '0;
          end
        end

        E_RUN: begin
          d_v <= iss_on;
          d_j <= j_iss;
          if (iss_on) begin
            if (j_iss == JW'(NF - 1)) iss_on <= 1'b0;
            else                      j_iss  <= j_iss + JW'(1);
          end
          if (d_v && feat_q[d_j]) begin
            for (int unsigned d = 0; d < CH; d++)
              cnt[d] <= cnt[d] + (p_rdata[d] ? SW'(1) : -SW'(1));
          end
          if (d_v && (d_j == JW'(NF - 1))) begin
            d_v   <= 1'b0;
            state <= E_HOLD;
          end
        end

        E_HOLD: begin
          // counters are final: hand the chunk over as soon as the output is free
          if (out_free) begin
            q_valid <= 1'b1;
            q_chunk <= sign_bits;
            q_idx   <= chunk;
            q_last  <= last_chunk;
            for (int unsigned d = 0; d < CH; d++) cnt[d] <= '0;
            if (last_chunk) begin
              state <= E_IDLE;
            end else begin
              chunk  <= chunk + KW'(1);
              j_iss  <= '0;
              iss_on <= 1'b1;
              state  <= E_RUN;
            end
          end
        end

        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
