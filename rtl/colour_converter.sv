// colour_converter: YCC-to-RGB peripheral converting four pixels per
// register transfer.
//
// Registers (32-bit word offsets; element 0 in bits 7:0):
//    0  Y     Y0..Y3         (write / read back)
//    1  CB    Cb0..Cb3       (write / read back)
//    2  CR    Cr0..Cr3       (write / read back); writing it starts a conversion
//    3  RGB0  R0 G0 B0 R1    (read)
//    4  RGB1  G1 B1 R2 G2    (read)
//    5  RGB2  B2 R3 G3 B3    (read)
// The output order is the interleaved R,G,B byte order of the decoder's
// output scanline, so three reads deliver four finished pixels.
//
// One ycc_rgb_pixel converter is shared by the four pixels. After the CR
// write a setup cycle loads pixel 0 into the operand registers; in each of
// the next four cycles one pixel's result is stored while the next pixel is
// loaded. With back-to-back writes of Y, CB and CR, the results can be read
// in the ninth cycle counted from the Y write. There are no control
// registers. While a conversion runs, any access to the block is stalled
// (ack held low), so a read can never return a stale pixel; the stall is this
// design's choice, the rest follows the document.
module colour_converter
  import jpeg_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  reg_bus_if.slave bus,
  output logic     busy
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_PIX0, S_PIX1, S_PIX2, S_PIX3} state_t;
  state_t state;

  logic [7:0] y_r [4];
  logic [7:0] cb_r [4];
  logic [7:0] cr_r [4];
  rgb_t       px  [4];
  logic [7:0] op_y, op_cb, op_cr;
  rgb_t       conv;

  assign busy    = state != S_IDLE;
  assign bus.ack = (bus.wr || bus.rd) && !busy;

  ycc_rgb_pixel u_px (.y(op_y), .cb(op_cb), .cr(op_cr), .rgb(conv));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      op_y  <= '0;
      op_cb <= '0;
      op_cr <= '0;
      for (int i = 0; i < 4; i++) begin
        y_r[i]  <= '0;
        cb_r[i] <= '0;
        cr_r[i] <= '0;
        px[i]   <= '0;
      end
    end else begin
      if (bus.wr && !busy) begin
        for (int i = 0; i < 4; i++) begin
          case (int'(bus.addr))
            CC_R_Y:  y_r[i]  <= bus.wdata[8*i +: 8];
            CC_R_CB: cb_r[i] <= bus.wdata[8*i +: 8];
            CC_R_CR: cr_r[i] <= bus.wdata[8*i +: 8];
            default: ;
          endcase
        end
        if (int'(bus.addr) == CC_R_CR) state <= S_SETUP;
      end
      case (state)
        S_SETUP: begin
          op_y <= y_r[0]; op_cb <= cb_r[0]; op_cr <= cr_r[0];
          state <= S_PIX0;
        end
        S_PIX0: begin
          px[0] <= conv;
          op_y <= y_r[1]; op_cb <= cb_r[1]; op_cr <= cr_r[1];
          state <= S_PIX1;
        end
        S_PIX1: begin
          px[1] <= conv;
          op_y <= y_r[2]; op_cb <= cb_r[2]; op_cr <= cr_r[2];
          state <= S_PIX2;
        end
        S_PIX2: begin
          px[2] <= conv;
          op_y <= y_r[3]; op_cb <= cb_r[3]; op_cr <= cr_r[3];
          state <= S_PIX3;
        end
        S_PIX3: begin
          px[3] <= conv;
          state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    case (int'(bus.addr))
      CC_R_Y:    bus.rdata = {y_r[3],  y_r[2],  y_r[1],  y_r[0]};
      CC_R_CB:   bus.rdata = {cb_r[3], cb_r[2], cb_r[1], cb_r[0]};
      CC_R_CR:   bus.rdata = {cr_r[3], cr_r[2], cr_r[1], cr_r[0]};
      CC_R_RGB0: bus.rdata = {px[1].r, px[0].b, px[0].g, px[0].r};
      CC_R_RGB1: bus.rdata = {px[2].g, px[2].r, px[1].b, px[1].g};
      CC_R_RGB2: bus.rdata = {px[3].b, px[3].g, px[3].r, px[2].b};
      default:       bus.rdata = '0;
    endcase
  end
endmodule
