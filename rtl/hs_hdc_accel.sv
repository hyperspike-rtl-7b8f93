// hs_hdc_accel: the hyperdimensional inference accelerator of HyperSpike.
//
// Encodes the SNN feature vector into a D-dimensional binary query
// hypervector by random projection (hs_rp_encoder) and classifies it by
// Hamming distance against the stored class hypervectors
// (hs_hamming_search). The two run as a pipeline over hypervector chunks:
// while the search compares chunk c with all classes, the encoder already
// builds chunk c+1. The encode-then-search structure follows the
// published design; the chunked pipeline is this design's choice.
//
// Operation: start (while idle) samples features and n_classes. Each
// chunk takes NF+2 encoder cycles, so a query needs (D/CH)*(NF+2) +
// 2*n_classes + 3 cycles (for n_classes <= NF); done then pulses for one cycle
// with class_out and min_dist, which hold until the next start.
// Both bank read ports have one cycle of latency.
module hs_hdc_accel
  import hs_pkg::*;
#(
  parameter int unsigned NF   = hs_pkg::N_NEUR,
  parameter int unsigned D    = hs_pkg::HV_D,
  parameter int unsigned CH   = hs_pkg::HV_CHUNK,
  parameter int unsigned NCLS = hs_pkg::N_CLASS,
  parameter int unsigned NCHK = D / CH,
  parameter int unsigned PAW  = clog2_min1(NCHK * NF),
  parameter int unsigned CAW  = clog2_min1(NCHK * NCLS),
  parameter int unsigned LW   = clog2_min1(NCLS),
  parameter int unsigned DSW  = $clog2(D + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NF-1:0]  features,
  input  logic [LW:0]    n_classes,
  output logic           busy,
  output logic           done,
  output logic [LW-1:0]  class_out,
  output logic [DSW-1:0] min_dist,
  output logic [DSW-1:0] hdist [NCLS],
  // projection bank read port
  output logic           p_re,
  output logic [PAW-1:0] p_raddr,
  input  logic [CH-1:0]  p_rdata,
  // class bank read port
  output logic           c_re,
  output logic [CAW-1:0] c_raddr,
  input  logic [CH-1:0]  c_rdata
);

  localparam int unsigned KW = clog2_min1(NCHK);

  logic          q_valid, q_ready, q_last;
  logic [CH-1:0] q_chunk;
  logic [KW-1:0] q_idx;
  logic          enc_busy, srch_busy;

  wire go = start && !busy;

  hs_rp_encoder #(.NF(NF), .D(D), .CH(CH)) u_enc (
    .clk, .rst_n,
    .start   (go),
    .features(features),
    .busy    (enc_busy),
    .p_re, .p_raddr, .p_rdata,
    .q_valid, .q_ready, .q_chunk, .q_idx, .q_last
  );

  hs_hamming_search #(.D(D), .CH(CH), .NCLS(NCLS)) u_srch (
    .clk, .rst_n,
    .start    (go),
    .n_classes(n_classes),
    .busy     (srch_busy),
    .q_valid, .q_ready, .q_chunk, .q_idx, .q_last,
    .c_re, .c_raddr, .c_rdata,
    .done, .class_out, .min_dist, .hdist
  );

  assign busy = enc_busy || srch_busy;

endmodule
