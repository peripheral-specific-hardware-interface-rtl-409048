// mmr: the memory mapped registers through which the CPU and one
// peripheral-specific hardware interface communicate. Every interface has the
// same layout (epoc_pkg MMR_*): a control register, a status register, a
// read-only device code, and four data registers that hold only finished
// physical values (temperature, pressure, humidity, gas resistance), so that
// application software never sees raw sensor data or calibration constants.
//
// CPU side: a simple synchronous register port. bus_we writes bus_wdata to
// word bus_addr; reads are combinational on bus_addr (bus_rdata). Writing 1
// to CTRL[0] requests one acquisition: start pulses for one cycle unless the
// interface is busy. CTRL[1] (reload calibration) is a level held in the
// register and read by the Control Unit sequencer at start.
// Hardware side: hw_we[i] writes hw_wdata[i] into DATAi (the correction units
// write their results here); acq_done (pulse) marks the end of an acquisition:
// STATUS[1] (data valid) is set and the acquisition counter STATUS[15:8]
// increments. STATUS[0] mirrors the interface's busy input. A new start
// clears STATUS[1]. The register layout and bus are this design's choice.
module mmr
  import epoc_pkg::*;
#(
  parameter logic [7:0] DEVICE_ID = DEV_BME280
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU register port
  input  logic                          bus_we,
  input  logic [2:0]                    bus_addr,
  input  logic [31:0]                   bus_wdata,
  output logic [31:0]                   bus_rdata,
  // hardware side
  output logic                          start,
  output logic                          reload_cal,
  input  logic                          busy,
  input  logic                          acq_done,
  input  logic [MMR_NDATA-1:0]          hw_we,
  input  logic [MMR_NDATA-1:0][31:0]    hw_wdata
);

  logic [MMR_NDATA-1:0][31:0] data_q;
  logic                       valid_q;
  logic [7:0]                 count_q;
  logic                       reload_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q   <= '0;
      valid_q  <= 1'b0;
      count_q  <= '0;
      reload_q <= 1'b0;
      start    <= 1'b0;
    end else begin
      start <= 1'b0;
      if (bus_we && bus_addr == 3'(MMR_CTRL)) begin
        reload_q <= bus_wdata[1];
        if (bus_wdata[0] && !busy) begin
          start   <= 1'b1;
          valid_q <= 1'b0;
        end
      end
      for (int i = 0; i < MMR_NDATA; i++)
        if (hw_we[i]) data_q[i] <= hw_wdata[i];
      if (acq_done) begin
        valid_q <= 1'b1;
        count_q <= count_q + 8'd1;
      end
    end
  end

  assign reload_cal = reload_q;

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      3'(MMR_CTRL):   bus_rdata = {30'd0, reload_q, 1'b0};
      3'(MMR_STATUS): bus_rdata = {16'd0, count_q, 6'd0, valid_q, busy};
      3'(MMR_DEVICE): bus_rdata = {24'd0, DEVICE_ID};
      3'(MMR_DATA0):  bus_rdata = data_q[0];
      3'(MMR_DATA1):  bus_rdata = data_q[1];
      3'(MMR_DATA2):  bus_rdata = data_q[2];
      3'(MMR_DATA3):  bus_rdata = data_q[3];
      default:        bus_rdata = '0;
    endcase
  end

endmodule
