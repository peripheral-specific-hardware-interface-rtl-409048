// tb_mmr: checks the memory mapped register block: start pulse on a CTRL
// write (and none while busy), the reload-calibration bit, the busy and
// data-valid status bits, the acquisition counter, the read-only device code,
// and hardware writes into the four data registers.
module tb_mmr;
  import epoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0;
  logic [2:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic start, reload_cal, busy = 1'b0, acq_done = 1'b0;
  logic [MMR_NDATA-1:0] hw_we = '0;
  logic [MMR_NDATA-1:0][31:0] hw_wdata = '0;
  int checks = 0, failures = 0, starts = 0;
  logic [31:0] exp_data [MMR_NDATA];

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  mmr #(.DEVICE_ID(DEV_BME680)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_we = 1'b1; bus_addr = 3'(a); bus_wdata = d;
    @(negedge clk); bus_we = 1'b0;
    @(negedge clk);
  endtask

  logic [31:0] r;
  task automatic rd(input int a);
    bus_addr = 3'(a);
    #1 r = bus_rdata;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd(MMR_DEVICE); check(r == 32'h61, "device code");
    rd(MMR_STATUS); check(r == 32'h0, "status after reset");
    wr(MMR_CTRL, 32'h1);
    check(starts == 1, "start pulse");
    check(reload_cal == 1'b0, "reload clear");
    wr(MMR_CTRL, 32'h3);
    check(starts == 2 && reload_cal, "start with reload");
    busy = 1'b1;
    wr(MMR_CTRL, 32'h1);
    check(starts == 2, "no start while busy");
    rd(MMR_STATUS); check(r == 32'h1, "busy status");
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      for (int i = 0; i < MMR_NDATA; i++) begin
        exp_data[i] = $urandom;
        hw_wdata[i] = exp_data[i];
      end
      hw_we = 4'b1111;
      @(negedge clk); hw_we = '0; acq_done = 1'b1;
      @(negedge clk); acq_done = 1'b0;
      for (int i = 0; i < MMR_NDATA; i++)
        begin rd(MMR_DATA0 + i); check(r == exp_data[i], $sformatf("data %0d", i)); end
      rd(MMR_STATUS); check(r == {16'd0, 8'(k + 1), 8'h03}, $sformatf("status %08h", r));
    end
    busy = 1'b0;
    wr(MMR_CTRL, 32'h1);
    rd(MMR_STATUS); check(r == {16'd0, 8'd3, 8'h00}, "start clears data valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
