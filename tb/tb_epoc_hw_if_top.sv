// tb_epoc_hw_if_top: end-to-end test of the whole hardware side at its
// default parameters: the BME280 and BME680 interfaces run acquisitions at
// the same time on their own SPI buses, driven by CPU register accesses on
// the shared register port, against the two SPI sensor models.
// Every mechanism of the design is made to happen and counted:
//   calibration burst read, calibration skipped on a later acquisition,
//   calibration reload requested by the CPU, status poll retry while the
//   sensor converts, SPI page switch (BME680), each of the three Control
//   Units of each interface driving the shared Comm Unit, the t_fine
//   hand-over between the two BME280 correction units, and the sequential
//   four-result write of the BME680 correction unit.
// Results are compared with the reference formulas.
module tb_epoc_hw_if_top;
  import epoc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0;
  logic [3:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [1:0] irq, sck, cs_n, mosi, miso;
  int checks = 0, failures = 0;
  logic [31:0] r;

  // mechanism counters
  int n_cal_read [2], n_cal_skip [2], n_reload [2], n_poll_retry [2];
  int n_cu_drive [2][3], n_hw_handover, n_seq_writes;

  always #5 clk = ~clk;

  epoc_hw_if_top dut (.clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
                      .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso));
  bme280_model #(.MEAS_POLLS(2)) u_s280 (.sck(sck[0]), .cs_n(cs_n[0]), .mosi(mosi[0]), .miso(miso[0]));
  bme680_model #(.MEAS_POLLS(3)) u_s680 (.sck(sck[1]), .cs_n(cs_n[1]), .mosi(mosi[1]), .miso(miso[1]));

  always @(posedge clk) if (rst_n) begin
    if (dut.u_bme280.cu_start[0]) n_cal_read[0]++;
    if (dut.u_bme680.cu_start[0]) n_cal_read[1]++;
    if (dut.u_bme280.start && dut.u_bme280.cal_valid && !dut.u_bme280.reload_cal) n_cal_skip[0]++;
    if (dut.u_bme680.start && dut.u_bme680.cal_valid && !dut.u_bme680.reload_cal) n_cal_skip[1]++;
    if (dut.u_bme280.start && dut.u_bme280.cal_valid && dut.u_bme280.reload_cal) n_reload[0]++;
    if (dut.u_bme680.start && dut.u_bme680.cal_valid && dut.u_bme680.reload_cal) n_reload[1]++;
    if (|dut.u_bme280.cu_retry) n_poll_retry[0]++;
    if (|dut.u_bme680.cu_retry) n_poll_retry[1]++;
    for (int i = 0; i < 3; i++) begin
      if (dut.u_bme280.cu_req[i].valid && dut.u_bme280.rsp.done) n_cu_drive[0][i]++;
      if (dut.u_bme680.cu_req[i].valid && dut.u_bme680.rsp.done) n_cu_drive[1][i]++;
    end
    if (dut.u_bme280.hw_valid) n_hw_handover++;
    if (dut.u_bme680.hw_we != '0) n_seq_writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_we = 1'b1; bus_addr = 4'(a); bus_wdata = d;
    @(negedge clk); bus_we = 1'b0;
  endtask
  task automatic rd(input int a);
    @(negedge clk); bus_addr = 4'(a);
    #1 r = bus_rdata;
  endtask

  int cal280 [12];
  int cal680 [21];

  task automatic load280(input int s);
    cal280 = '{27504 + s, 26435, -1000, 36477, -10685, 3024, 2855 + s, 140, -7, 15500, -14600, 6000};
    for (int i = 0; i < 12; i++)
      {u_s280.regs[8'h89 + 2 * i], u_s280.regs[8'h88 + 2 * i]} = 16'(cal280[i]);
  endtask

  task automatic load680(input int s);
    cal680 = '{26059 + s, 26325, 3, 36054, -10407, 88, 7052 - s, -36, 30, 41, -2853, -2950, 30,
               814, 1003 + s, 0, 45, 20, 120, -100, -3};
    {u_s680.regs[8'h8B], u_s680.regs[8'h8A]} = 16'(cal680[C_T2]);
    u_s680.regs[8'h8C] = 8'(cal680[C_T3]);
    {u_s680.regs[8'h8F], u_s680.regs[8'h8E]} = 16'(cal680[C_P1]);
    {u_s680.regs[8'h91], u_s680.regs[8'h90]} = 16'(cal680[C_P2]);
    u_s680.regs[8'h92] = 8'(cal680[C_P3]);
    {u_s680.regs[8'h95], u_s680.regs[8'h94]} = 16'(cal680[C_P4]);
    {u_s680.regs[8'h97], u_s680.regs[8'h96]} = 16'(cal680[C_P5]);
    u_s680.regs[8'h98] = 8'(cal680[C_P7]);
    u_s680.regs[8'h99] = 8'(cal680[C_P6]);
    {u_s680.regs[8'h9D], u_s680.regs[8'h9C]} = 16'(cal680[C_P8]);
    {u_s680.regs[8'h9F], u_s680.regs[8'h9E]} = 16'(cal680[C_P9]);
    u_s680.regs[8'hA0] = 8'(cal680[C_P10]);
    u_s680.regs[8'hE1] = 8'(cal680[C_H2] >> 4);
    u_s680.regs[8'hE2] = {4'(cal680[C_H2]), 4'(cal680[C_H1])};
    u_s680.regs[8'hE3] = 8'(cal680[C_H1] >> 4);
    u_s680.regs[8'hE4] = 8'(cal680[C_H3]); u_s680.regs[8'hE5] = 8'(cal680[C_H4]);
    u_s680.regs[8'hE6] = 8'(cal680[C_H5]); u_s680.regs[8'hE7] = 8'(cal680[C_H6]);
    u_s680.regs[8'hE8] = 8'(cal680[C_H7]);
    {u_s680.regs[8'hEA], u_s680.regs[8'hE9]} = 16'(cal680[C_T1]);
    u_s680.regs[8'h04] = {4'(cal680[C_RSW]), 4'h0};
  endtask

  // one acquisition on both interfaces at once
  task automatic acquire_both(input bit reload);
    int at, ap, bt, bp, bh, bg, br, tf, e [6];
    int unsigned pe, ge;
    at = 450000 + int'($urandom_range(0, 100000));
    ap = 350000 + int'($urandom_range(0, 100000));
    {u_s280.regs[8'hF7], u_s280.regs[8'hF8], u_s280.regs[8'hF9]} = {ap[19:0], 4'h0};
    {u_s280.regs[8'hFA], u_s280.regs[8'hFB], u_s280.regs[8'hFC]} = {at[19:0], 4'h0};
    bt = 470000 + int'($urandom_range(0, 80000));
    bp = 350000 + int'($urandom_range(0, 100000));
    bh = 18000 + int'($urandom_range(0, 30000));
    bg = int'($urandom_range(0, 1023));
    br = int'($urandom_range(0, 15));
    {u_s680.regs[8'h1F], u_s680.regs[8'h20], u_s680.regs[8'h21]} = {bp[19:0], 4'h0};
    {u_s680.regs[8'h22], u_s680.regs[8'h23], u_s680.regs[8'h24]} = {bt[19:0], 4'h0};
    {u_s680.regs[8'h25], u_s680.regs[8'h26]} = 16'(bh);
    {u_s680.regs[8'h2A], u_s680.regs[8'h2B]} = {bg[9:0], 2'b11, 4'(br)};
    e[0] = bme280_temp(at, cal280[0], cal280[1], cal280[2], tf);
    pe = bme280_press(ap, tf, cal280[3], cal280[4], cal280[5], cal280[6], cal280[7], cal280[8],
                      cal280[9], cal280[10], cal280[11]);
    e[1] = int'(pe);
    e[2] = bme680_temp(bt, cal680, tf);
    e[3] = bme680_press(bp, tf, cal680);
    e[4] = bme680_hum(bh, tf, cal680);
    ge = bme680_gas(bg, br, cal680[C_RSW]);
    e[5] = int'(ge);
    wr(MMR_CTRL, {30'd0, reload, 1'b1});
    wr(8 + MMR_CTRL, {30'd0, reload, 1'b1});
    do begin rd(MMR_STATUS); end while (r[0]);
    do begin rd(8 + MMR_STATUS); end while (r[0]);
    rd(MMR_STATUS);     check(r[1], "BME280 data valid");
    rd(8 + MMR_STATUS); check(r[1], "BME680 data valid");
    rd(MMR_DATA0);      check(r == e[0], $sformatf("BME280 T %0d exp %0d", $signed(r), e[0]));
    rd(MMR_DATA1);      check(r == e[1], $sformatf("BME280 P %0d exp %0d", r, e[1]));
    rd(8 + MMR_DATA0);  check(r == e[2], $sformatf("BME680 T %0d exp %0d", $signed(r), e[2]));
    rd(8 + MMR_DATA1);  check(r == e[3], $sformatf("BME680 P %0d exp %0d", r, e[3]));
    rd(8 + MMR_DATA2);  check(r == e[4], $sformatf("BME680 H %0d exp %0d", r, e[4]));
    rd(8 + MMR_DATA3);  check(r == e[5], $sformatf("BME680 G %0d exp %0d", r, e[5]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load280(0);
    load680(0);
    rd(MMR_DEVICE);     check(r[7:0] == DEV_BME280, "BME280 device code");
    rd(8 + MMR_DEVICE); check(r[7:0] == DEV_BME680, "BME680 device code");
    acquire_both(1'b0);
    acquire_both(1'b0);
    load280(50);
    load680(21);
    acquire_both(1'b1);
    acquire_both(1'b0);
    for (int k = 0; k < 2; k++) begin
      check(n_cal_read[k] == 2, $sformatf("if%0d calibration reads %0d", k, n_cal_read[k]));
      check(n_cal_skip[k] > 0, $sformatf("if%0d calibration skipped %0d", k, n_cal_skip[k]));
      check(n_reload[k] > 0, $sformatf("if%0d calibration reloads %0d", k, n_reload[k]));
      check(n_poll_retry[k] > 0, $sformatf("if%0d poll retries %0d", k, n_poll_retry[k]));
      for (int i = 0; i < 3; i++)
        check(n_cu_drive[k][i] > 0, $sformatf("if%0d Control Unit %0d drove the Comm Unit", k, i));
    end
    check(u_s680.page_switches > 0, "BME680 page switches");
    check(n_hw_handover == 4, $sformatf("t_fine hand-overs %0d", n_hw_handover));
    check(n_seq_writes == 16, $sformatf("BME680 result writes %0d", n_seq_writes));
    $display("mechanisms: cal reads %0d/%0d, skips %0d/%0d, reloads %0d/%0d, poll retries %0d/%0d, page switches %0d, hand-overs %0d",
             n_cal_read[0], n_cal_read[1], n_cal_skip[0], n_cal_skip[1], n_reload[0], n_reload[1],
             n_poll_retry[0], n_poll_retry[1], u_s680.page_switches, n_hw_handover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
