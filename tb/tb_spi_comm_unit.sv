// tb_spi_comm_unit: checks the SPI master (Comm Unit) against a simple mode-0
// SPI slave written in the testbench. Sends random multi-byte transactions,
// checks every byte seen on MOSI, every byte returned from MISO, that CS
// stays low across a burst and rises after the last byte, that SCK idles low,
// and that a byte takes 16*SCK_HALF cycles (80 at 100 MHz / 10 MHz).
module tb_spi_comm_unit;
  import epoc_pkg::*;

  localparam int SCK_HALF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  comm_req_t req;
  comm_rsp_t rsp;
  logic busy, sck, cs_n, mosi, miso;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  spi_comm_unit #(.SCK_HALF(SCK_HALF), .CS_GAP(5)) dut (
    .clk, .rst_n, .req, .rsp, .busy, .spi_sck(sck), .spi_cs_n(cs_n),
    .spi_mosi(mosi), .spi_miso(miso));

  // ---- mode-0 slave ----
  logic [7:0] s_out [$];
  logic [7:0] s_in  [$];
  logic [7:0] s_sh_in, s_sh_out;
  int s_bits = 0;
  int cs_falls = 0, cs_rises = 0;
  always @(negedge cs_n) begin
    cs_falls++;
    s_bits = 0;
    s_sh_out = (s_out.size() > 0) ? s_out.pop_front() : 8'h00;
    miso = s_sh_out[7];
  end
  always @(posedge cs_n) if (rst_n) cs_rises++;
  always @(posedge sck) if (!cs_n) begin
    s_sh_in = {s_sh_in[6:0], mosi};
    s_bits++;
    if (s_bits == 8) begin
      s_in.push_back(s_sh_in);
      s_bits = 0;
    end
  end
  always @(negedge sck) if (!cs_n) begin
    if (s_bits == 0) s_sh_out = (s_out.size() > 0) ? s_out.pop_front() : 8'h00;
    else s_sh_out = {s_sh_out[6:0], 1'b0};
    miso = s_sh_out[7];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SCK must idle low whenever CS is high
  always @(posedge clk) if (rst_n && cs_n && sck) begin
    failures++; $display("FAIL: SCK high while CS high");
  end

  initial begin
    logic [7:0] tx [$], rxexp [$];
    int n, t0, t1;
    req = '0; miso = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      n = 1 + (t % 4);
      tx.delete(); rxexp.delete(); s_in.delete(); s_out.delete();
      for (int i = 0; i < n; i++) begin
        tx.push_back(8'($urandom));
        rxexp.push_back(8'($urandom));
        s_out.push_back(rxexp[i]);
      end
      // the requester must present the next byte (or drop valid) on the
      // cycle rsp.done is seen, as a Control Unit does
      @(negedge clk);
      req.valid = 1'b1; req.last = (n == 1); req.tx = tx[0];
      t0 = cyc;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (!rsp.done) @(negedge clk);
        t1 = cyc;
        check(rsp.rx == rxexp[i], $sformatf("rx byte %0d: got %02h exp %02h", i, rsp.rx, rxexp[i]));
        // accepted on the first edge, done 16*SCK_HALF edges later
        // a burst byte is accepted one cycle later, once rsp.done has fallen
        check(t1 - t0 == 16 * SCK_HALF + 1 + (i > 0), $sformatf("byte time %0d cycles", t1 - t0 - 1));
        check(!cs_n, "CS low at byte end");
        if (i == n - 1) req = '0;
        else begin
          req.valid = 1'b1; req.last = (i + 1 == n - 1); req.tx = tx[i + 1];
        end
        t0 = cyc;
      end
      @(negedge clk); req = '0;
      wait (cs_n == 1'b1);
      repeat (2) @(posedge clk);
      check(s_in.size() == n, "slave byte count");
      for (int i = 0; i < n && i < s_in.size(); i++)
        check(s_in[i] == tx[i], $sformatf("mosi byte %0d: got %02h exp %02h", i, s_in[i], tx[i]));
      wait (!busy);
    end
    check(cs_falls == 6 && cs_rises == 6, $sformatf("CS toggles %0d/%0d", cs_falls, cs_rises));
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
