// tb_bme680_if: end-to-end test of the BME680 interface with its default
// parameters against the BME680 SPI model (two register pages). Checks that
// the calibration blocks are read from page 0 and the range switching error
// and data from page 1, that the configuration registers (humidity
// oversampling, heater set point and wait time, run-gas, forced mode) are
// written, that status polling waits for new data, that the calibration is
// read only once unless CTRL[1] asks for a reload, and that the four MMR
// data registers match the reference formulas. It also checks that an
// acquisition takes at most 30 % longer than its SPI traffic alone.
module tb_bme680_if;
  import epoc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0;
  logic [2:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic irq, sck, cs_n, mosi, miso;
  int checks = 0, failures = 0, irqs = 0;
  logic [31:0] r;
  int cal [21];

  always #5 clk = ~clk;
  int cyc = 0, sck_edges = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (irq) irqs <= irqs + 1;
  end
  always @(posedge sck) sck_edges++;

  bme680_if dut (.clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
                 .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso));
  bme680_model #(.MEAS_POLLS(3)) u_sensor (.sck, .cs_n, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_we = 1'b1; bus_addr = 3'(a); bus_wdata = d;
    @(negedge clk); bus_we = 1'b0;
  endtask
  task automatic rd(input int a);
    @(negedge clk); bus_addr = 3'(a);
    #1 r = bus_rdata;
  endtask

  task automatic load_cal(input int s);
    cal[C_T1] = 26059 + s; cal[C_T2] = 26325 - s; cal[C_T3] = 3;
    cal[C_P1] = 36054 + s; cal[C_P2] = -10407; cal[C_P3] = 88; cal[C_P4] = 7052 - s;
    cal[C_P5] = -36; cal[C_P6] = 30; cal[C_P7] = 41; cal[C_P8] = -2853; cal[C_P9] = -2950;
    cal[C_P10] = 30; cal[C_H1] = 814 + s; cal[C_H2] = 1003 - s; cal[C_H3] = 0; cal[C_H4] = 45;
    cal[C_H5] = 20; cal[C_H6] = 120; cal[C_H7] = -100; cal[C_RSW] = (s % 16) - 8;
    {u_sensor.regs[8'h8B], u_sensor.regs[8'h8A]} = 16'(cal[C_T2]);
    u_sensor.regs[8'h8C] = 8'(cal[C_T3]);
    {u_sensor.regs[8'h8F], u_sensor.regs[8'h8E]} = 16'(cal[C_P1]);
    {u_sensor.regs[8'h91], u_sensor.regs[8'h90]} = 16'(cal[C_P2]);
    u_sensor.regs[8'h92] = 8'(cal[C_P3]);
    {u_sensor.regs[8'h95], u_sensor.regs[8'h94]} = 16'(cal[C_P4]);
    {u_sensor.regs[8'h97], u_sensor.regs[8'h96]} = 16'(cal[C_P5]);
    u_sensor.regs[8'h98] = 8'(cal[C_P7]);
    u_sensor.regs[8'h99] = 8'(cal[C_P6]);
    {u_sensor.regs[8'h9D], u_sensor.regs[8'h9C]} = 16'(cal[C_P8]);
    {u_sensor.regs[8'h9F], u_sensor.regs[8'h9E]} = 16'(cal[C_P9]);
    u_sensor.regs[8'hA0] = 8'(cal[C_P10]);
    u_sensor.regs[8'hE1] = 8'(cal[C_H2] >> 4);
    u_sensor.regs[8'hE2] = {4'(cal[C_H2]), 4'(cal[C_H1])};
    u_sensor.regs[8'hE3] = 8'(cal[C_H1] >> 4);
    u_sensor.regs[8'hE4] = 8'(cal[C_H3]); u_sensor.regs[8'hE5] = 8'(cal[C_H4]);
    u_sensor.regs[8'hE6] = 8'(cal[C_H5]); u_sensor.regs[8'hE7] = 8'(cal[C_H6]);
    u_sensor.regs[8'hE8] = 8'(cal[C_H7]);
    {u_sensor.regs[8'hEA], u_sensor.regs[8'hE9]} = 16'(cal[C_T1]);
    u_sensor.regs[8'h04] = {4'(cal[C_RSW]), 4'h5};
  endtask

  task automatic acquire(input bit reload, input int n, input bit expect_cal);
    int at, ap, ah, ag, rng, tf, t_exp, p_exp, h_exp, tr0, busy0, c0, e0;
    int unsigned g_exp;
    at = 470000 + int'($urandom_range(0, 80000));
    ap = 350000 + int'($urandom_range(0, 100000));
    ah = 18000 + int'($urandom_range(0, 30000));
    ag = int'($urandom_range(0, 1023));
    rng = int'($urandom_range(0, 15));
    {u_sensor.regs[8'h1F], u_sensor.regs[8'h20], u_sensor.regs[8'h21]} = {ap[19:0], 4'h0};
    {u_sensor.regs[8'h22], u_sensor.regs[8'h23], u_sensor.regs[8'h24]} = {at[19:0], 4'h0};
    {u_sensor.regs[8'h25], u_sensor.regs[8'h26]} = 16'(ah);
    {u_sensor.regs[8'h2A], u_sensor.regs[8'h2B]} = {ag[9:0], 2'b11, 4'(rng)};
    t_exp = bme680_temp(at, cal, tf);
    p_exp = bme680_press(ap, tf, cal);
    h_exp = bme680_hum(ah, tf, cal);
    g_exp = bme680_gas(ag, rng, cal[C_RSW]);
    tr0 = u_sensor.n_trans; busy0 = u_sensor.n_busy_reads;
    c0 = cyc; e0 = sck_edges;
    wr(MMR_CTRL, {30'd0, reload, 1'b1});
    do rd(MMR_STATUS); while (r[0]);
    $display("acquisition %0d: %0d cycles, SPI-bound ideal %0d", n, cyc - c0, (sck_edges - e0) * 10);
    // within 30 % of the time the SPI traffic alone takes at 10 MHz
    check((cyc - c0) * 10 < (sck_edges - e0) * 10 * 13,
          $sformatf("acquisition %0d cycles, ideal %0d", cyc - c0, (sck_edges - e0) * 10));
    check(r[1] && r[15:8] == 8'(n), $sformatf("status %08h", r));
    check(irqs == n, "irq per acquisition");
    check(u_sensor.n_busy_reads - busy0 == 3, "poll waited for new data");
    // cfg: 6 writes + 4 polls; data: 1; cal: 2 page writes + 3 reads
    check(u_sensor.n_trans - tr0 == 11 + (expect_cal ? 5 : 0),
          $sformatf("SPI transactions %0d", u_sensor.n_trans - tr0));
    check(u_sensor.regs[8'h72] == 8'h01 && u_sensor.regs[8'h74] == 8'h25 &&
          u_sensor.regs[8'h71] == 8'h10 && u_sensor.regs[8'h5A] == 8'h80 &&
          u_sensor.regs[8'h64] == 8'h59, "configuration registers");
    check(u_sensor.regs[8'h73][4] == 1'b1, "left on page 1");
    rd(MMR_DATA0); check(r == t_exp, $sformatf("T %0d exp %0d", $signed(r), t_exp));
    rd(MMR_DATA1); check(r == p_exp, $sformatf("P %0d exp %0d", r, p_exp));
    rd(MMR_DATA2); check(r == h_exp, $sformatf("H %0d exp %0d", r, h_exp));
    rd(MMR_DATA3); check(r == g_exp, $sformatf("G %0d exp %0d", r, g_exp));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_cal(0);
    rd(MMR_DEVICE); check(r[7:0] == DEV_BME680, "device code");
    acquire(1'b0, 1, 1'b1);
    check(u_sensor.page_switches == 1, $sformatf("page switches %0d", u_sensor.page_switches));
    acquire(1'b0, 2, 1'b0);
    acquire(1'b0, 3, 1'b0);
    load_cal(37);
    acquire(1'b1, 4, 1'b1);
    acquire(1'b0, 5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
