// epoc_hw_if_top: the hardware side of the super general purpose SoC as
// evaluated with two real SPI sensors: a BME280 interface (separate
// temperature and pressure correction units chained through t_fine) and a
// BME680 interface (one correction unit for four data kinds), each a
// complete Comm Unit / Control Unit / correction unit / MMR stack with its
// own SPI pins.
// The CPU reaches both register files through one word-addressed register
// port: bus_addr[3] selects the interface (0 = BME280, 1 = BME680) and
// bus_addr[2:0] the register (epoc_pkg MMR_*). Reads are combinational.
// irq[i] pulses when interface i has finished an acquisition.
// In the reference system the interfaces are loaded into an FPGA by dynamic
// partial reconfiguration; here both are instantiated statically side by side.
module epoc_hw_if_top #(
  parameter int unsigned SCK_HALF = 5,
  parameter int unsigned CS_GAP   = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_we,
  input  logic [3:0]   bus_addr,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  output logic [1:0]   irq,
  output logic [1:0]   spi_sck,
  output logic [1:0]   spi_cs_n,
  output logic [1:0]   spi_mosi,
  input  logic [1:0]   spi_miso
);

  logic [31:0] rdata280, rdata680;

  bme280_if #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_bme280 (
    .clk, .rst_n,
    .bus_we(bus_we && !bus_addr[3]), .bus_addr(bus_addr[2:0]), .bus_wdata,
    .bus_rdata(rdata280), .irq(irq[0]),
    .spi_sck(spi_sck[0]), .spi_cs_n(spi_cs_n[0]), .spi_mosi(spi_mosi[0]),
    .spi_miso(spi_miso[0]));

  bme680_if #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_bme680 (
    .clk, .rst_n,
    .bus_we(bus_we && bus_addr[3]), .bus_addr(bus_addr[2:0]), .bus_wdata,
    .bus_rdata(rdata680), .irq(irq[1]),
    .spi_sck(spi_sck[1]), .spi_cs_n(spi_cs_n[1]), .spi_mosi(spi_mosi[1]),
    .spi_miso(spi_miso[1]));

  assign bus_rdata = bus_addr[3] ? rdata680 : rdata280;

endmodule
