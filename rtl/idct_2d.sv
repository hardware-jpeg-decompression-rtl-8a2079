// idct_2d: dequantising 8x8 2D-IDCT peripheral with range limiting.
//
// Software hands the block over row by row through 32-bit registers (word
// offsets):
//    0..7   QUANT   quantisation entry i of the current row (low 16 bits)
//    8..11  COEF    coefficient pairs {c[2k+1], c[2k]}, c[2k] in bits 15:0
//   13      OUT0    output samples 0..3 of the current output row
//   14      OUT1    output samples 4..7; reading it advances to the next row
//   21      DONE    bit 0 = 1 when all eight output rows are ready
// Registers 0..11 read back what was written; the others read as zero.
// Output samples are packed with sample 0 in bits 7:0.
//
// Writing COEF 11 completes a row: the eight coefficients are dequantised
// (coefficient * table entry, truncated to 16 bits) and sent into the shared
// four-stage 1D-IDCT. Four cycles later the result is written into row r of
// the 8x8 matrix. Rows are pipelined, so software can write row n while row
// n-1 is still being transformed. When the eighth row result is stored the
// block issues the eight column IDCTs, one per cycle, reading the matrix by
// columns and writing the results back by columns; four cycles after the last
// column enters, DONE rises. Each output register read converts a matrix row
// to samples by adding 128 and clamping to 0..255.
//
// Writing the first row of the next block clears DONE and restarts the row
// count and the output row pointer; the previous block must have been read
// out by then. A COEF 11 write that arrives while the column pass runs is
// stalled (ack held low) until the pass ends.
//
// From the document: the register offsets, the per-row register transfer, the
// dequantise / row pass / transpose / column pass / range limit sequence and
// the single shared 1D-IDCT. This design's own choices: the pipelined 1D-IDCT,
// the bit packing within a register word (as the document's figure draws it),
// the stall, and how a new block restarts the counters.
module idct_2d
  import jpeg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  reg_bus_if.slave  bus,
  output logic      done
);
  typedef enum logic [1:0] {PH_ROWS, PH_COLS, PH_DONE} phase_t;
  phase_t phase;

  coef_t      quant [8];
  coef_t      coef  [8];
  logic [3:0] row_issued, row_stored, col_issued, col_stored;
  logic [2:0] out_ptr;

  // ------------------------------------------------ bus decode
  logic wr_quant, wr_coef, row_go, rd_out1, wr_ok;
  assign wr_ok    = !(int'(bus.addr) == (IDCT_R_COEF3) && phase == PH_COLS);
  assign bus.ack  = (bus.wr && wr_ok) || bus.rd;
  assign wr_quant = bus.wr && int'(bus.addr) < IDCT_R_COEF0;
  assign wr_coef  = bus.wr && int'(bus.addr) >= (IDCT_R_COEF0) && int'(bus.addr) <= (IDCT_R_COEF3);
  assign row_go   = bus.wr && wr_ok && int'(bus.addr) == (IDCT_R_COEF3);
  assign rd_out1  = bus.rd && int'(bus.addr) == (IDCT_R_OUT1);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) begin
        quant[i] <= '0;
        coef[i]  <= '0;
      end
    end else if (wr_quant) begin
      quant[bus.addr[2:0]] <= coef_t'(bus.wdata[15:0]);
    end else if (wr_coef && wr_ok) begin
      coef[{bus.addr[1:0], 1'b0}] <= coef_t'(bus.wdata[15:0]);
      coef[{bus.addr[1:0], 1'b1}] <= coef_t'(bus.wdata[31:16]);
    end
  end

  // ------------------------------------------------ dequantisation
  coef_t row_in [8];
  coef_t deq    [8];
  always_comb begin
    for (int i = 0; i < 6; i++) row_in[i] = coef[i];
    row_in[6] = coef_t'(bus.wdata[15:0]);   // last pair comes straight off the bus
    row_in[7] = coef_t'(bus.wdata[31:16]);
  end
  dequantizer u_deq (.coef(row_in), .quant(quant), .deq(deq));

  // ------------------------------------------------ shared 1D-IDCT
  logic  col_go;
  logic  idct_in_valid, idct_out_valid;
  coef_t idct_in [8];
  coef_t idct_out [8];
  coef_t col_q [8];
  coef_t row_q [8];

  assign col_go        = phase == PH_COLS && col_issued < 4'd8;
  assign idct_in_valid = row_go || col_go;
  always_comb begin
    for (int i = 0; i < 8; i++) idct_in[i] = col_go ? col_q[i] : deq[i];
  end

  idct_1d u_idct (
    .clk, .rst,
    .in_valid (idct_in_valid),
    .in_x     (idct_in),
    .out_valid(idct_out_valid),
    .out_y    (idct_out)
  );

  logic row_we, col_we;
  assign row_we = idct_out_valid && phase != PH_COLS;
  assign col_we = idct_out_valid && phase == PH_COLS;

  idct_matrix u_mat (
    .clk,
    .row_we, .row_widx(row_stored[2:0]), .row_d(idct_out),
    .col_we, .col_widx(col_stored[2:0]), .col_d(idct_out),
    .col_ridx(col_issued[2:0]), .col_q(col_q),
    .row_ridx(out_ptr),          .row_q(row_q)
  );

  // ------------------------------------------------ sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= PH_ROWS;
      row_issued <= '0;
      row_stored <= '0;
      col_issued <= '0;
      col_stored <= '0;
      out_ptr    <= '0;
    end else begin
      if (row_go) begin
        if (phase == PH_DONE) begin       // first row of a new block
          phase      <= PH_ROWS;
          row_issued <= 4'd1;
          row_stored <= '0;
          out_ptr    <= '0;
        end else begin
          row_issued <= row_issued + 4'd1;
        end
      end
      if (row_we) begin
        row_stored <= row_stored + 4'd1;
        if (row_stored == 4'd7) begin
          phase      <= PH_COLS;
          col_issued <= '0;
          col_stored <= '0;
        end
      end
      if (col_go) col_issued <= col_issued + 4'd1;
      if (col_we) begin
        col_stored <= col_stored + 4'd1;
        if (col_stored == 4'd7) phase <= PH_DONE;
      end
      if (rd_out1) out_ptr <= out_ptr + 3'd1;
    end
  end

  assign done = phase == PH_DONE;

  // ------------------------------------------------ read data
  logic [31:0] out_word0, out_word1;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      out_word0[8*i +: 8] = idct_range_limit(row_q[i]);
      out_word1[8*i +: 8] = idct_range_limit(row_q[i+4]);
    end
  end

  always_comb begin
    bus.rdata = '0;
    if (int'(bus.addr) < (IDCT_R_COEF0)) begin
      bus.rdata = {16'h0, quant[bus.addr[2:0]]};
    end else if (int'(bus.addr) <= (IDCT_R_COEF3)) begin
      bus.rdata = {coef[{bus.addr[1:0], 1'b1}], coef[{bus.addr[1:0], 1'b0}]};
    end else if (int'(bus.addr) == (IDCT_R_OUT0)) begin
      bus.rdata = out_word0;
    end else if (int'(bus.addr) == (IDCT_R_OUT1)) begin
      bus.rdata = out_word1;
    end else if (int'(bus.addr) == (IDCT_R_DONE)) begin
      bus.rdata = {31'h0, done};
    end
  end

  // A row result never arrives during the column pass, and no more than
  // eight rows are issued per block.
  a_rows : assert property (@(posedge clk) disable iff (rst)
                            row_go && phase != PH_DONE |-> row_issued < 4'd8);
endmodule
