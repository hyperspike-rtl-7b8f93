// hs_param_mem: one bank of the parameter memory that holds the model
// (SNN weights, projection and class hypervectors) and the query spikes.
//
// The memory of the published design is an energy-efficient emerging
// technology (ReRAM, low-voltage SRAM) whose price is bit errors in the
// data it stores; the classifier is meant to tolerate them without error
// correction. This bank reproduces that behaviour: every bit of a word is
// flipped as it is written with probability ber_thr / 65535, so a stored
// error persists for every later read. ber_thr = 0 gives an ideal memory.
// The flip decision of bit b comes from its own 16-bit maximal-length
// Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1), seeded at reset from SEED
// and b; all LFSRs advance once per write. The error model (independent
// flips at write time) and the LFSR source are this design's choice.
//
// Interface: one write port (we, waddr, wdata) and one read port
// (re, raddr); rdata is registered and valid the cycle after re.
// Timing: one write and one read per cycle, read latency 1.
module hs_param_mem #(
  parameter int unsigned DW    = 500,
  parameter int unsigned DEPTH = 480,
  parameter int unsigned AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH),
  parameter logic [15:0] SEED  = 16'hACE1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   ber_thr,   // flip probability per bit = ber_thr/65535
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic [31:0]   flip_count  // total bits flipped since reset (saturating)
);

  logic [DW-1:0] mem [DEPTH];
  logic [15:0]   lfsr [DW];
  logic [DW-1:0] flip;
  logic [$clog2(DW+1)-1:0] nflip;

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  function automatic logic [15:0] lfsr_seed(input int unsigned b);
    logic [15:0] s;
    s = SEED ^ 16'((b * 32'd40503) ^ (b >> 3));
    return (s == 16'h0) ? 16'h1 : s;
  endfunction

  always_comb begin
    nflip = '0;
    for (int unsigned b = 0; b < DW; b++) begin
      flip[b] = (ber_thr != 16'h0) && (lfsr[b] <= ber_thr);
      nflip   = nflip + flip[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < DW; b++) lfsr[b] <= lfsr_seed(b);
      flip_count <= '0;
    end else if (we) begin
      for (int unsigned b = 0; b < DW; b++) lfsr[b] <= lfsr_next(lfsr[b]);
      if (flip_count <= 32'hFFFF_FFFF - 32'(nflip)) flip_count <= flip_count + 32'(nflip);
      else                                          flip_count <= 32'hFFFF_FFFF;
    end
  end

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata ^ flip;
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
