// tb_lut_ram: checks the cell memory against a reference array.
// Random reads and writes, on both ports in the same clock, including the
// same address (the read must return the word held before the write),
// and reads with rd_en low (the output must hold). The read data must
// appear exactly one clock after the address.
`timescale 1ns/1ps
module tb_lut_ram;
  localparam int unsigned AW = 6;
  localparam int unsigned DW = 13;

  logic          clk = 1'b0;
  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [DW-1:0] rd_data, wr_data;

  lut_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  int n_collide = 0, n_hold = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_q;
    rd_en = 1'b0; wr_en = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = DW'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b1; rd_addr = '0;
    @(posedge clk);
    exp_q = model[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // result of the read sampled at the last edge
      checks++;
      if (rd_data !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: read %h expected %h", rd_data, exp_q);
      end
      rd_en   = ($urandom_range(3, 0) != 0);
      rd_addr = AW'($urandom);
      wr_en   = $urandom_range(1, 0) == 1;
      wr_addr = ($urandom_range(3, 0) == 0) ? rd_addr : AW'($urandom);
      wr_data = DW'($urandom);
      if (rd_en && wr_en && rd_addr == wr_addr) n_collide++;
      if (!rd_en) n_hold++;
      @(posedge clk);
      if (rd_en) exp_q = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
    end
    checks++;
    if (n_collide == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: collisions %0d holds %0d", n_collide, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
