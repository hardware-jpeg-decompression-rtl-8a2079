// jpeg_accel_top: the two JPEG decompression accelerators behind one
// processor register port.
//
// The processor sees two memory-mapped peripherals: the dequantising 2D-IDCT
// (idct_2d, 22 registers at IDCT_BASE) and the YCC-to-RGB colour converter
// (colour_converter, 6 registers at CC_BASE). Each occupies one 4 KiB page;
// bus_addr is a byte address and bits 11:2 select the 32-bit register. The
// port follows the same request / acknowledge rule as reg_bus_if: hold
// bus_wr or bus_rd with bus_addr and bus_wdata until bus_ack; read data is
// valid in the acknowledging cycle. Accesses outside both pages, or beyond a
// peripheral's last register, are acknowledged at once and read as zero.
// Byte-lane bits 1:0 of bus_addr are ignored: every access is a full word.
//
// The base addresses are the ones the accelerator's software driver maps. The
// processor, its bus and the bus slave attachment are not part of this RTL;
// the page decode stands in for the slave attachment's address match.
module jpeg_accel_top #(
  parameter logic [31:0] IDCT_BASE = 32'hA6E2_0000,
  parameter logic [31:0] CC_BASE   = 32'hA6E3_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  output logic        idct_done,
  output logic        cc_busy
);
  import jpeg_pkg::*;

  reg_bus_if #(.ADDR_W(5)) idct_bus (.clk, .rst);
  reg_bus_if #(.ADDR_W(3)) cc_bus   (.clk, .rst);

  logic [9:0] word;
  logic       sel_idct, sel_cc;
  assign word     = bus_addr[11:2];
  assign sel_idct = bus_addr[31:12] == IDCT_BASE[31:12] && word < 10'(IDCT_NUM_REG);
  assign sel_cc   = bus_addr[31:12] == CC_BASE[31:12]   && word < 10'(CC_NUM_REG);

  assign idct_bus.wr    = bus_wr && sel_idct;
  assign idct_bus.rd    = bus_rd && sel_idct;
  assign idct_bus.addr  = word[4:0];
  assign idct_bus.wdata = bus_wdata;

  assign cc_bus.wr      = bus_wr && sel_cc;
  assign cc_bus.rd      = bus_rd && sel_cc;
  assign cc_bus.addr    = word[2:0];
  assign cc_bus.wdata   = bus_wdata;

  idct_2d          u_idct (.clk, .rst, .bus(idct_bus), .done(idct_done));
  colour_converter u_cc   (.clk, .rst, .bus(cc_bus),   .busy(cc_busy));

  always_comb begin
    if (sel_idct) begin
      bus_ack   = idct_bus.ack;
      bus_rdata = idct_bus.rdata;
    end else if (sel_cc) begin
      bus_ack   = cc_bus.ack;
      bus_rdata = cc_bus.rdata;
    end else begin
      bus_ack   = bus_wr || bus_rd;
      bus_rdata = '0;
    end
  end
endmodule
