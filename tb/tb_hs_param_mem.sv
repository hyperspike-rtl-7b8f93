// tb_hs_param_mem: self-checking test of one parameter-memory bank.
// 1) ber_thr = 0: random words written and read back unchanged, with one
//    cycle of read latency. 2) ber_thr = 65535: every written bit is
//    flipped. 3) ber_thr = 655 (1 %): the observed flip fraction over
//    many words lies within a wide band around 1 %, and flip_count equals
//    the number of differing bits found on read-back.
module tb_hs_param_mem;
  localparam int unsigned DW = 64, DEPTH = 256, AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] ber_thr;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [31:0] flip_count;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hs_param_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_all(input logic [15:0] thr);
    ber_thr = thr;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a);
      wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
  endtask

  // returns total number of bits that differ from the model
  task automatic read_all(output int nd, input bit expect_exact, input bit expect_inv);
    nd = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); re = 1'b1; raddr = AW'(a);
      @(negedge clk); re = 1'b0;
      nd += $countones(rdata ^ model[a]);
      if (expect_exact) begin
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: %h vs %h", a, rdata, model[a]);
        end
      end
      if (expect_inv) begin
        checks++;
        if (rdata !== ~model[a]) failures++;
      end
    end
  endtask

  initial begin
    int nd;
    int unsigned fc0;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; ber_thr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    write_all(16'd0);
    read_all(nd, 1'b1, 1'b0);
    checks++; if (flip_count != 0) failures++;

    fc0 = flip_count;
    write_all(16'hFFFF);
    read_all(nd, 1'b0, 1'b1);
    checks++; if (flip_count - fc0 != DW * DEPTH) begin failures++; $display("flip_count %0d", flip_count - fc0); end

    for (int rep = 0; rep < 4; rep++) begin
      fc0 = flip_count;
      write_all(16'd655);
      read_all(nd, 1'b0, 1'b0);
      checks++;
      if (flip_count - fc0 != nd) begin failures++; $display("flip_count %0d vs %0d", flip_count - fc0, nd); end
      // 16384 bits at 1 %: mean 164, accept 80..260
      checks++;
      if (nd < 80 || nd > 260) begin failures++; $display("flip rate out of band: %0d of %0d", nd, DW*DEPTH); end
      else $display("1%% BER: %0d flips of %0d bits", nd, DW*DEPTH);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
