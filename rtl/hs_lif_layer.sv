// hs_lif_layer: one fully connected layer of discretised leaky
// integrate-and-fire neurons, the feature extractor of HyperSpike.
//
// Per time step t, for every input j and neuron i (Spike Response Model
// form of the LIF neuron):
//   P_j <- alpha*P_j + S_in_j                     pre-synaptic trace
//   R_i <- alpha*R_i + alpha*U_i*S_i              reset / refractory
//   U_i <- sum_j W_ij*P_j - R_i                   membrane potential
//   S_i <- (U_i >= U_th)                          spike
// with all state zero before the first step of a query. The weights are
// random and never trained; the spike vector S after the last step is the
// feature vector handed to the hyperdimensional classifier. These
// equations, 16-bit quantisation and integer weights follow the published
// design. The number formats, the evaluation order and the sequential,
// LANES-wide datapath are this design's choice:
//   W  signed W_W-bit integer, P unsigned Q4.12, U and R signed ACC_W bits
//   with 12 fraction bits, alpha unsigned Q0.16; every alpha product is
//   truncated toward minus infinity (>>> 16); P saturates at all ones.
//
// Operation: start (while idle) runs n_steps time steps. Each step first
// updates the trace (N_IN/LANES cycles, one input-bank word per cycle),
// then visits neuron 0..N_NEUR-1, each for N_IN/LANES cycles of LANES
// multiply-accumulates. A step takes exactly (N_NEUR+1)*N_IN/LANES + 2
// cycles. done pulses for one cycle when the last step has finished;
// spikes holds the final spike vector until the next start.
// Memory ports: weight word i*(N_IN/LANES)+c holds W[i][c*LANES+l] in lane
// l; input word t*(N_IN/LANES)+c holds S_in[c*LANES+l] of step t in bit l.
// Both reads have one cycle of latency.
module hs_lif_layer
  import hs_pkg::*;
#(
  parameter int unsigned NI    = hs_pkg::N_IN,
  parameter int unsigned NN    = hs_pkg::N_NEUR,
  parameter int unsigned L     = hs_pkg::LANES,
  parameter int unsigned TMAX  = hs_pkg::T_MAX,
  parameter int unsigned NCH   = NI / L,
  parameter int unsigned WAW   = clog2_min1(NN * NCH),
  parameter int unsigned IAW   = clog2_min1(TMAX * NCH),
  parameter int unsigned TW    = $clog2(TMAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [TW-1:0]           n_steps,
  input  logic [ALPHA_W-1:0]      alpha,
  input  logic signed [ACC_W-1:0] u_th,
  output logic                    busy,
  output logic                    done,
  output logic [NN-1:0]           spikes,
  // weight bank read port
  output logic                    w_re,
  output logic [WAW-1:0]          w_raddr,
  input  logic [L*W_W-1:0]        w_rdata,
  // input-spike bank read port
  output logic                    in_re,
  output logic [IAW-1:0]          in_raddr,
  input  logic [L-1:0]            in_rdata
);

  localparam int unsigned CW = clog2_min1(NCH);
  localparam int unsigned NW = clog2_min1(NN);
  localparam logic [P_W-1:0] P_ONE = P_W'(1) << P_FRAC;

  typedef enum logic [1:0] {S_IDLE, S_TRACE, S_NEUR} state_e;
  state_e state;

  logic [L*P_W-1:0]        p_mem [NCH];
  logic signed [ACC_W-1:0] u_mem [NN];
  logic signed [ACC_W-1:0] r_mem [NN];

  logic          first;        // first step of the query: old state reads as zero
  logic [TW-1:0] t_cur;
  logic [TW-1:0] t_last;
  logic [ALPHA_W-1:0] alpha_q;
  logic signed [ACC_W-1:0] uth_q;

  // issue side
  logic [CW-1:0] c_iss;
  logic [NW-1:0] i_iss;
  logic          iss_on;
  // data side (one cycle later)
  logic          d_v;
  logic [CW-1:0] d_c;
  logic [NW-1:0] d_i;
  logic [L*P_W-1:0] p_rd;
  logic signed [ACC_W-1:0] acc;

  // ---------------- trace update of one word ----------------
  logic [L*P_W-1:0] p_new;
  always_comb begin
    for (int unsigned l = 0; l < L; l++) begin
      logic [P_W-1:0]         p_old;
      logic [P_W+ALPHA_W-1:0] prod;
      logic [P_W:0]           sum;
      p_old = first ? '0 : p_mem[d_c][l*P_W +: P_W];
      prod  = p_old * alpha_q;
      sum   = {1'b0, prod[ALPHA_W +: P_W]} + (in_rdata[l] ? {1'b0, P_ONE} : '0);
      p_new[l*P_W +: P_W] = sum[P_W] ? '1 : sum[P_W-1:0];
    end
  end

  // ---------------- LANES-wide synaptic dot product ----------------
  logic signed [ACC_W-1:0] partial;
  always_comb begin
    partial = '0;
    for (int unsigned l = 0; l < L; l++) begin
      logic signed [W_W-1:0]     w;
      logic signed [P_W:0]       p;
      logic signed [W_W+P_W:0]   m;
      w = w_rdata[l*W_W +: W_W];
      p = $signed({1'b0, p_rd[l*P_W +: P_W]});
      m = w * p;
      partial = partial + ACC_W'(m);
    end
  end

  // ---------------- neuron update at its last word ----------------
  logic signed [ACC_W-1:0]         acc_base, acc_sum;
  logic signed [ACC_W:0]           r_in;
  logic signed [ACC_W+ALPHA_W+1:0] r_prod;
  logic signed [ACC_W-1:0]         r_new, u_new;
  always_comb begin
    acc_base = (d_c == '0) ? '0 : acc;
    acc_sum  = acc_base + partial;
    r_in     = (ACC_W+1)'(r_mem[d_i]) + ((spikes[d_i]) ? (ACC_W+1)'(u_mem[d_i]) : '0);
    r_prod   = r_in * $signed({1'b0, alpha_q});
    r_new    = first ? '0 : ACC_W'(r_prod >>> ALPHA_W);
    u_new    = acc_sum - r_new;
  end

  wire last_c_iss = (c_iss == CW'(NCH - 1));
  wire last_i_iss = (i_iss == NW'(NN - 1));

  always_comb begin
    w_re     = (state == S_NEUR) && iss_on;
    w_raddr  = WAW'(i_iss) * WAW'(NCH) + WAW'(c_iss);
    in_re    = (state == S_TRACE) && iss_on;
    in_raddr = IAW'(t_cur) * IAW'(NCH) + IAW'(c_iss);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      first   <= 1'b1;
      t_cur   <= '0;
      t_last  <= '0;
      alpha_q <= '0;
      uth_q   <= '0;
      c_iss   <= '0;
      i_iss   <= '0;
      iss_on  <= 1'b0;
      d_v     <= 1'b0;
      d_c     <= '0;
      d_i     <= '0;
      acc     <= '0;
      done    <= 1'b0;
      spikes  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            alpha_q <= alpha;
            uth_q   <= u_th;
            t_cur   <= '0;
            t_last  <= n_steps - TW'(1);
            first   <= 1'b1;
            c_iss   <= '0;
            i_iss   <= '0;
            if (n_steps == '0) begin
              spikes <= '0;
              done   <= 1'b1;
            end else begin
              iss_on <= 1'b1;
              state  <= S_TRACE;
            end
          end
        end

        S_TRACE: begin
          // issue input words
          d_v <= iss_on;
          d_c <= c_iss;
          if (iss_on) begin
            if (last_c_iss) begin
              iss_on <= 1'b0;
              c_iss  <= '0;
            end else begin
              c_iss <= c_iss + CW'(1);
            end
          end
          // write updated trace words
          if (d_v) begin
            p_mem[d_c] <= p_new;
            if (d_c == CW'(NCH - 1)) begin
              state  <= S_NEUR;
              iss_on <= 1'b1;
              d_v    <= 1'b0;
              c_iss  <= '0;
              i_iss  <= '0;
            end
          end
        end

        S_NEUR: begin
          d_v  <= iss_on;
          d_c  <= c_iss;
          d_i  <= i_iss;
          p_rd <= p_mem[c_iss];
          if (iss_on) begin
            if (last_c_iss) begin
              c_iss <= '0;
              if (last_i_iss) iss_on <= 1'b0;
              else            i_iss  <= i_iss + NW'(1);
            end else begin
              c_iss <= c_iss + CW'(1);
            end
          end
          if (d_v) begin
            acc <= acc_sum;
            if (d_c == CW'(NCH - 1)) begin
              u_mem[d_i]  <= u_new;
              r_mem[d_i]  <= r_new;
              spikes[d_i] <= (u_new >= uth_q);
              if (d_i == NW'(NN - 1)) begin
                d_v   <= 1'b0;
                first <= 1'b0;
                c_iss <= '0;
                i_iss <= '0;
                if (t_cur == t_last) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end else begin
                  t_cur  <= t_cur + TW'(1);
                  iss_on <= 1'b1;
                  state  <= S_TRACE;
                end
              end
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
