// tb_bme280_if: end-to-end test of the BME280 interface with its default
// parameters (100 MHz clock, 10 MHz SCK) against the BME280 SPI model.
// The CPU side only writes CTRL and reads STATUS and the data registers.
// 1) first acquisition: calibration burst, ctrl_meas write, status polling,
//    raw data burst, correction; the model holds the data sheet's example, so
//    the MMR must read 25.08 degC and about 100653 Pa;
// 2) further acquisitions with random raw data skip the calibration read;
// 3) CTRL[1] forces a calibration reload with new constants.
// Results are compared with the reference formulas. It also checks that the
// acquisition time stays within 25 % of the ideal set by the SPI traffic
// (SCK edges times the SCK period), the irq pulse and STATUS counter.
module tb_bme280_if;
  import epoc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SCK_HALF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0;
  logic [2:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic irq, sck, cs_n, mosi, miso;
  int checks = 0, failures = 0, cyc = 0, sck_edges = 0, irqs = 0;
  logic [31:0] r;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (irq) irqs <= irqs + 1;
  end
  always @(posedge sck) sck_edges++;

  bme280_if dut (.clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
                 .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso));
  bme280_model #(.MEAS_POLLS(2)) u_sensor (.sck, .cs_n, .mosi, .miso);

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

  int calv [12];
  task automatic load_cal(input int c [12]);
    for (int i = 0; i < 12; i++) {u_sensor.regs[8'h89 + 2 * i], u_sensor.regs[8'h88 + 2 * i]} = 16'(c[i]);
    calv = c;
  endtask
  task automatic load_raw(input int adc_t, input int adc_p);
    {u_sensor.regs[8'hF7], u_sensor.regs[8'hF8], u_sensor.regs[8'hF9]} = {adc_p[19:0], 4'h0};
    {u_sensor.regs[8'hFA], u_sensor.regs[8'hFB], u_sensor.regs[8'hFC]} = {adc_t[19:0], 4'h0};
  endtask

  task automatic acquire(input int adc_t, input int adc_p, input bit reload, input int n,
                         input bit expect_cal);
    int t_exp, tf, c0, e0, trans0;
    int unsigned p_exp;
    load_raw(adc_t, adc_p);
    t_exp = bme280_temp(adc_t, calv[0], calv[1], calv[2], tf);
    p_exp = bme280_press(adc_p, tf, calv[3], calv[4], calv[5], calv[6], calv[7], calv[8],
                         calv[9], calv[10], calv[11]);
    c0 = cyc; e0 = sck_edges; trans0 = u_sensor.n_trans;
    wr(MMR_CTRL, {30'd0, reload, 1'b1});
    rd(MMR_STATUS);
    check(r[0] == 1'b1 && r[1] == 1'b0, "busy, data not valid after start");
    do rd(MMR_STATUS); while (r[0]);
    check(r[1] == 1'b1 && r[15:8] == 8'(n), $sformatf("status %08h after acquisition %0d", r, n));
    check(irqs == n, "irq pulse per acquisition");
    // 1 write + (polls) + 1 data read, plus the calibration burst if loaded
    check(u_sensor.n_trans - trans0 == 5 + (expect_cal ? 1 : 0),
          $sformatf("SPI transactions %0d", u_sensor.n_trans - trans0));
    check(u_sensor.regs[8'hF4] == 8'h25, "ctrl_meas forced mode");
    // time against the ideal set by the SPI traffic
    check((cyc - c0) * 4 < (sck_edges - e0) * 2 * SCK_HALF * 5,
          $sformatf("acquisition %0d cycles, ideal %0d", cyc - c0, (sck_edges - e0) * 2 * SCK_HALF));
    $display("acquisition %0d: %0d cycles, SPI-bound ideal %0d", n, cyc - c0, (sck_edges - e0) * 2 * SCK_HALF);
    rd(MMR_DATA0);
    check(r == t_exp, $sformatf("temperature %0d exp %0d", $signed(r), t_exp));
    rd(MMR_DATA1);
    check(r == p_exp, $sformatf("pressure %0d exp %0d", r, p_exp));
  endtask

  initial begin
    int c [12];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_cal('{27504, 26435, -1000, 36477, -10685, 3024, 2855, 140, -7, 15500, -14600, 6000});
    rd(MMR_DEVICE);
    check(r[7:0] == DEV_BME280, "device code");
    acquire(519888, 415148, 1'b0, 1, 1'b1);
    rd(MMR_DATA0);
    check(r == 2508, "data sheet temperature 25.08 degC");
    rd(MMR_DATA1);
    check(r / 256 == 100653, "data sheet pressure 100653 Pa");
    for (int k = 2; k <= 4; k++)
      acquire(450000 + int'($urandom_range(0, 100000)), 350000 + int'($urandom_range(0, 100000)),
              1'b0, k, 1'b0);
    // new part: reload calibration
    c = '{27000, 26800, -900, 36000, -10500, 3000, 2900, 120, -7, 15000, -14000, 5800};
    load_cal(c);
    acquire(500000, 400000, 1'b1, 5, 1'b1);
    acquire(510000, 410000, 1'b0, 6, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
