// bme280_if: dedicated hardware interface for the BME280 temperature and
// pressure sensor on SPI, built from the three layers of the architecture:
//   Comm Unit    spi_comm_unit, the SPI master driving the sensor pins;
//   Control      three ctrl_unit instances, one per function:
//                  u_cal  reads the 24 calibration bytes (0x88..0x9F),
//                  u_cfg  writes ctrl_meas (forced mode) and polls status
//                         until the conversion has finished,
//                  u_dat  reads the 6 raw data bytes (0xF7..0xFC);
//                their requests to the Comm Unit are OR'ed, its answer is
//                shared;
//   HLS layer    hls_bme280_temp and hls_bme280_press, two separate
//                correction units joined by the t_fine ("hw") port;
//   MMR          mmr, the registers the CPU sees.
// Operation: a CPU write of CTRL[0] starts an acquisition. The sequencer here
// runs u_cal (only on the first acquisition, or when CTRL[1] asks for a
// reload), then u_cfg, then u_dat, and hands over to HLS Temp with a
// one-cycle handshake. HLS Temp writes temperature and passes t_fine to HLS
// Press, which writes pressure; its completion ends the acquisition (STATUS
// data-valid set, counter incremented, irq pulse). The CPU thus only reads
// finished temperature (0.01 degC) and pressure (Pa, Q24.8) values.
// CTRL_MEAS defaults to 0x25: temperature and pressure oversampling x1,
// forced mode. The sequencing and the register values are this design's.
module bme280_if
  import epoc_pkg::*;
#(
  parameter int unsigned SCK_HALF  = 5,
  parameter int unsigned CS_GAP    = 5,
  parameter logic [7:0]  CTRL_MEAS = 8'h25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_we,
  input  logic [2:0]   bus_addr,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  output logic         irq,
  output logic         spi_sck,
  output logic         spi_cs_n,
  output logic         spi_mosi,
  input  logic         spi_miso
);

  localparam ctrl_cmd_t PROG_CAL [2] = '{cmd_rd(8'h88, 8'd24, 8'd0), cmd_end()};
  localparam ctrl_cmd_t PROG_CFG [3] = '{cmd_wr(8'hF4, CTRL_MEAS),
                                         cmd_poll(8'hF3, 8'h09, 8'h00), cmd_end()};
  localparam ctrl_cmd_t PROG_DAT [2] = '{cmd_rd(8'hF7, 8'd6, 8'd0), cmd_end()};

  typedef enum logic [2:0] {Q_IDLE, Q_CAL, Q_CFG, Q_DAT, Q_HLS} seq_e;
  seq_e seq;

  logic       start, reload_cal, acq_done, busy;
  logic       cal_valid;
  logic [2:0] cu_start, cu_busy, cu_done, cu_retry;
  comm_req_t  cu_req [3];
  comm_req_t  req;
  comm_rsp_t  rsp;
  logic [23:0][7:0] cd;
  logic [5:0][7:0]  sd;
  logic       hs_start, t_busy, t_done, p_busy, p_done;
  logic       hw_valid;
  logic signed [31:0] hw_t_fine;
  logic [MMR_NDATA-1:0]       hw_we;
  logic [MMR_NDATA-1:0][31:0] hw_wdata;
  logic       t_we, p_we;
  logic [31:0] t_wdata, p_wdata;
  logic       comm_busy;
  logic [0:0][7:0] cfg_rd;   // last status byte read by the poll

  // ---------------- sequencer of the Control Units ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq       <= Q_IDLE;
      cu_start  <= '0;
      hs_start  <= 1'b0;
      cal_valid <= 1'b0;
      acq_done  <= 1'b0;
    end else begin
      cu_start <= '0;
      hs_start <= 1'b0;
      acq_done <= 1'b0;
      unique case (seq)
        Q_IDLE: if (start) begin
          if (!cal_valid || reload_cal) begin
            cu_start[0] <= 1'b1;
            seq         <= Q_CAL;
          end else begin
            cu_start[1] <= 1'b1;
            seq         <= Q_CFG;
          end
        end
        Q_CAL: if (cu_done[0]) begin
          cal_valid   <= 1'b1;
          cu_start[1] <= 1'b1;
          seq         <= Q_CFG;
        end
        Q_CFG: if (cu_done[1]) begin
          cu_start[2] <= 1'b1;
          seq         <= Q_DAT;
        end
        Q_DAT: if (cu_done[2]) begin
          hs_start <= 1'b1;
          seq      <= Q_HLS;
        end
        Q_HLS: if (p_done) begin
          acq_done <= 1'b1;
          seq      <= Q_IDLE;
        end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  assign busy = (seq != Q_IDLE) || acq_done;   // until STATUS shows the result
  assign irq  = acq_done;

  // ---------------- Control Units ----------------
  ctrl_unit #(.NCMD(2), .BUF_BYTES(24), .PROG(PROG_CAL)) u_cal (
    .clk, .rst_n, .start(cu_start[0]), .busy(cu_busy[0]), .done(cu_done[0]),
    .poll_retry(cu_retry[0]), .req(cu_req[0]), .rsp, .rdata(cd));

  ctrl_unit #(.NCMD(3), .BUF_BYTES(1), .PROG(PROG_CFG)) u_cfg (
    .clk, .rst_n, .start(cu_start[1]), .busy(cu_busy[1]), .done(cu_done[1]),
    .poll_retry(cu_retry[1]), .req(cu_req[1]), .rsp, .rdata(cfg_rd));

  ctrl_unit #(.NCMD(2), .BUF_BYTES(6), .PROG(PROG_DAT)) u_dat (
    .clk, .rst_n, .start(cu_start[2]), .busy(cu_busy[2]), .done(cu_done[2]),
    .poll_retry(cu_retry[2]), .req(cu_req[2]), .rsp, .rdata(sd));

  // outputs of the Control Units are OR'ed, the input is shared
  assign req = cu_req[0] | cu_req[1] | cu_req[2];

  a_one_cu: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cu_busy));

  // ---------------- Comm Unit ----------------
  spi_comm_unit #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_comm (
    .clk, .rst_n, .req, .rsp, .busy(comm_busy),
    .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso);

  // ---------------- HLS layer ----------------
  hls_bme280_temp u_temp (
    .clk, .rst_n, .hs_start, .cd, .sd, .busy(t_busy), .done(t_done),
    .hw_valid, .hw_t_fine, .mmr_we(t_we), .mmr_wdata(t_wdata));

  hls_bme280_press u_press (
    .clk, .rst_n, .hw_valid, .hw_t_fine, .cd, .sd, .busy(p_busy), .done(p_done),
    .mmr_we(p_we), .mmr_wdata(p_wdata));

  assign hw_we    = {2'b00, p_we, t_we};
  assign hw_wdata = {32'd0, 32'd0, p_wdata, t_wdata};

  // ---------------- MMR ----------------
  mmr #(.DEVICE_ID(DEV_BME280)) u_mmr (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .start, .reload_cal, .busy, .acq_done, .hw_we, .hw_wdata);

endmodule
