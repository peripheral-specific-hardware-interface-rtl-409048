// tb_hls_bme280_press: checks the BME280 pressure correction unit against the
// data sheet's worked example (about 100653 Pa), against the 64-bit reference
// formula for random raw values and calibration sets, the zero-divisor guard
// (P1 = 0 gives 0) and the latency from the t_fine hand-over to done.
module tb_hls_bme280_press;
  import tb_ref_pkg::*;

  localparam int LAT = 77;   // cycles from hw_valid to done

  logic clk = 1'b0, rst_n = 1'b0;
  logic hw_valid = 1'b0, busy, done, mmr_we;
  logic signed [31:0] hw_t_fine = '0;
  logic [31:0] mmr_wdata;
  logic [23:0][7:0] cd;
  logic [5:0][7:0]  sd;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hls_bme280_press dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int adc, input int tf, input int p [9]);
    int unsigned p_exp;
    int c0;
    cd = '0;
    for (int i = 0; i < 6; i++) cd[i] = 8'($urandom);
    for (int i = 0; i < 9; i++) {cd[7 + 2 * i], cd[6 + 2 * i]} = 16'(p[i]);
    sd = '0;
    {sd[0], sd[1], sd[2]} = {adc[19:0], 4'h0};
    {sd[3], sd[4], sd[5]} = 24'($urandom);
    p_exp = bme280_press(adc, tf, p[0], p[1], p[2], p[3], p[4], p[5], p[6], p[7], p[8]);
    @(negedge clk) begin hw_valid = 1'b1; hw_t_fine = tf; c0 = cyc; end
    @(negedge clk) hw_valid = 1'b0;
    while (!done) @(negedge clk);
    if (p[0] != 0) check(cyc - c0 == LAT, $sformatf("latency %0d", cyc - c0));
    check(mmr_we, "mmr write with done");
    check(mmr_wdata == p_exp, $sformatf("P %0d exp %0d", mmr_wdata, p_exp));
  endtask

  initial begin
    int ex [9] = '{36477, -10685, 3024, 2855, 140, -7, 15500, -14600, 6000};
    int rp [9];
    cd = '0; sd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(415148, 128422, ex);
    check(mmr_wdata / 256 == 100653, $sformatf("data sheet example %0d Pa", mmr_wdata / 256));
    for (int k = 0; k < 40; k++) begin
      rp = ex;
      for (int i = 0; i < 9; i++) rp[i] = ex[i] + int'($urandom_range(0, 200)) - 100;
      run(300000 + int'($urandom_range(0, 250000)), 80000 + int'($urandom_range(0, 100000)), rp);
    end
    rp = ex; rp[0] = 0;
    run(415148, 128422, rp);
    check(mmr_wdata == 0, "zero divisor gives 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
