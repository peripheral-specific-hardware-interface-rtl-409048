// tb_ctrl_unit: runs a Control Unit program through a Comm Unit against the
// BME280 SPI model: a register write, a status poll that has to retry while
// the model reports "measuring", a 24-byte burst read into the buffer and a
// single-byte read at a buffer offset. Checks the written register, the read
// bytes against the model's registers, the number of poll retries, the done
// pulse and that the request bus stays all-zero while the unit is idle.
module tb_ctrl_unit;
  import epoc_pkg::*;

  localparam int POLLS = 3;
  localparam ctrl_cmd_t PROG [5] = '{cmd_wr(8'hF4, 8'h25),
                                     cmd_poll(8'hF3, 8'h09, 8'h00),
                                     cmd_rd(8'h88, 8'd24, 8'd0),
                                     cmd_rd(8'hD0, 8'd1, 8'd24),
                                     cmd_end()};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done, poll_retry;
  comm_req_t req;
  comm_rsp_t rsp;
  logic [25:0][7:0] rdata;
  logic cbusy, sck, cs_n, mosi, miso;
  int checks = 0, failures = 0, retries = 0, dones = 0;

  always #5 clk = ~clk;

  ctrl_unit #(.NCMD(5), .BUF_BYTES(26), .PROG(PROG)) dut (
    .clk, .rst_n, .start, .busy, .done, .poll_retry, .req, .rsp, .rdata);
  spi_comm_unit #(.SCK_HALF(2), .CS_GAP(2)) u_comm (
    .clk, .rst_n, .req, .rsp, .busy(cbusy), .spi_sck(sck), .spi_cs_n(cs_n),
    .spi_mosi(mosi), .spi_miso(miso));
  bme280_model #(.MEAS_POLLS(POLLS)) u_sensor (.sck, .cs_n, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (poll_retry) retries++;
    if (done) dones++;
    if (!busy && req != '0) begin failures++; $display("FAIL: request while idle"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 24; i++) u_sensor.regs[8'h88 + i] = 8'($urandom);
    u_sensor.regs[8'hF4] = 8'h00;
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      retries = 0; dones = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      check(busy, "busy after start");
      while (busy) @(negedge clk);
      @(negedge clk);
      check(dones == 1, $sformatf("done pulses %0d", dones));
      check(u_sensor.regs[8'hF4] == 8'h25, "ctrl_meas written");
      check(retries == POLLS, $sformatf("poll retries %0d exp %0d", retries, POLLS));
      for (int i = 0; i < 24; i++)
        check(rdata[i] == u_sensor.regs[8'h88 + i],
              $sformatf("calib byte %0d: %02h exp %02h", i, rdata[i], u_sensor.regs[8'h88 + i]));
      check(rdata[24] == 8'h60, "chip id at buffer offset 24");
      check(rdata[25] == 8'h00, "untouched buffer byte");
      for (int i = 0; i < 24; i++) u_sensor.regs[8'h88 + i] = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
