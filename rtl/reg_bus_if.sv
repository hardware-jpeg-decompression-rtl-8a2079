// reg_bus_if: word-addressed register port between a bus slave attachment
// and a peripheral's user logic.
//
// The master drives wr or rd (never both) together with addr (32-bit word
// offset inside the peripheral) and, for writes, wdata, and holds them until
// the slave raises ack. ack is combinational: a transfer completes on the
// rising clock edge where the request and ack are both high, and on a read
// rdata is valid in that same cycle. A slave stalls a transfer simply by
// holding ack low. This is the chip-enable style register port that a
// processor-bus slave attachment presents to user logic, reduced to an
// address and two strobes.
interface reg_bus_if #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 32
) (
  input logic clk,
  input logic rst
);
  logic              wr;
  logic              rd;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W-1:0] rdata;
  logic              ack;

  modport master (output wr, rd, addr, wdata, input rdata, ack);
  modport slave  (input wr, rd, addr, wdata, output rdata, ack);

  // A read and a write are never requested together.
  a_excl : assert property (@(posedge clk) disable iff (rst) !(wr && rd));
  // A stalled request stays put until it is acknowledged.
  a_hold : assert property (@(posedge clk) disable iff (rst)
                            (wr || rd) && !ack |=> (wr || rd) && $stable(addr));
endinterface
