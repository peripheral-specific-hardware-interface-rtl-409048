// tb_hls_bme280_temp: checks the BME280 temperature correction unit against
// the data sheet's worked example (adc_T = 519888 gives t_fine = 128422 and
// 25.08 degC) and against the reference formula for random raw values and
// calibration sets. Also checks the t_fine hand-over port and the latency.
module tb_hls_bme280_temp;
  import tb_ref_pkg::*;

  localparam int LAT = 5;   // cycles from hs_start to done

  logic clk = 1'b0, rst_n = 1'b0;
  logic hs_start = 1'b0, busy, done, hw_valid, mmr_we;
  logic signed [31:0] hw_t_fine;
  logic [31:0] mmr_wdata;
  logic [23:0][7:0] cd;
  logic [5:0][7:0]  sd;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hls_bme280_temp dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int adc, input int t1, input int t2, input int t3);
    int t_exp, tf_exp, c0;
    cd = '0;
    {cd[1], cd[0]} = 16'(t1);
    {cd[3], cd[2]} = 16'(t2);
    {cd[5], cd[4]} = 16'(t3);
    for (int i = 6; i < 24; i++) cd[i] = 8'($urandom);
    sd = '0;
    {sd[3], sd[4], sd[5]} = {adc[19:0], 4'h0};
    {sd[0], sd[1], sd[2]} = 24'($urandom);
    t_exp = bme280_temp(adc, t1, t2, t3, tf_exp);
    @(negedge clk) hs_start = 1'b1; c0 = cyc;
    @(negedge clk) hs_start = 1'b0;
    while (!done) @(negedge clk);
    check(cyc - c0 == LAT, $sformatf("latency %0d", cyc - c0));
    check(mmr_we && hw_valid, "mmr write and hw hand-over with done");
    check(mmr_wdata == t_exp, $sformatf("T %0d exp %0d", $signed(mmr_wdata), t_exp));
    check(hw_t_fine == tf_exp, $sformatf("t_fine %0d exp %0d", hw_t_fine, tf_exp));
  endtask

  initial begin
    int tf;
    cd = '0; sd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(519888, 27504, 26435, -1000);
    check(mmr_wdata == 2508 && hw_t_fine == 128422, "data sheet example");
    for (int k = 0; k < 50; k++)
      run(400000 + int'($urandom_range(0, 200000)), 27000 + int'($urandom_range(0, 2000)),
          26000 + int'($urandom_range(0, 1000)), -1200 + int'($urandom_range(0, 400)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
