// double_buffer_tb: ping-pong operation. The fill side writes random banks of
// data and commits them while the drain side reads back and releases at a
// different pace. Checked: fill_ready/drain_valid flags (both banks full
// blocks the filler, both empty blocks the drainer), data integrity in
// order, the one-cycle read latency and the fill side's read-back port.
module double_buffer_tb;
  localparam int WIDTH = 48, DEPTH = 8, AW = 3, NBANKS = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic fill_ready, drain_valid;
  logic fill_wr_en = 1'b0, fill_rd_en = 1'b0, fill_commit = 1'b0;
  logic drain_rd_en = 1'b0, drain_release = 1'b0;
  logic [AW-1:0] fill_wr_addr = '0, fill_rd_addr = '0, drain_rd_addr = '0;
  logic [WIDTH-1:0] fill_wr_data = '0, fill_rd_data, drain_rd_data;
  logic [WIDTH-1:0] data [NBANKS][DEPTH];
  int checks = 0, failures = 0, fill_blocked = 0, drain_blocked = 0;

  double_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    foreach (data[b, i]) data[b][i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (!fill_ready || drain_valid) failures++;
    fork
      for (int b = 0; b < NBANKS; b++) begin            // filler
        while (!fill_ready) begin fill_blocked++; tick(); end
        for (int i = 0; i < DEPTH; i++) begin
          fill_wr_en = 1'b1; fill_wr_addr = AW'(i); fill_wr_data = data[b][i]; tick();
        end
        fill_wr_en = 1'b0;
        // read back one word through the fill port
        fill_rd_en = 1'b1; fill_rd_addr = AW'(b % DEPTH); tick(); fill_rd_en = 1'b0;
        checks++; if (fill_rd_data !== data[b][b % DEPTH]) failures++;
        fill_commit = 1'b1; tick(); fill_commit = 1'b0;
      end
      for (int b = 0; b < NBANKS; b++) begin            // drainer
        while (!drain_valid) begin drain_blocked++; tick(); end
        if (b >= 4) repeat (25) tick();                   // slow drainer: filler must wait
        for (int i = DEPTH-1; i >= 0; i--) begin
          drain_rd_en = 1'b1; drain_rd_addr = AW'(i); tick(); drain_rd_en = 1'b0;
          checks++;
          if (drain_rd_data !== data[b][i]) begin
            failures++;
            if (failures < 5) $display("bank %0d word %0d wrong", b, i);
          end
        end
        drain_release = 1'b1; tick(); drain_release = 1'b0;
      end
    join
    checks++; if (fill_blocked == 0)  begin failures++; $display("filler never blocked"); end
    checks++; if (drain_blocked == 0) begin failures++; $display("drainer never blocked"); end
    checks++; if (!fill_ready || drain_valid) failures++;
    $display("filler waited %0d cycles, drainer waited %0d cycles", fill_blocked, drain_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
