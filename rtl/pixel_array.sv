// pixel_array: the 128 x 120 SPAD pixel array.
//
// Every pixel counts gated SPAD events (see spad_pixel). The controls follow
// the readout timing of the sensor: a global EXPOSURE enable, a per-row reset
// and a row select that puts one row of counts on the column lines. Two time
// gates, A and B, are broadcast to the array; with interleave set, even
// columns use gate A and odd columns gate B, otherwise every column uses A.
// With gating disabled the pixels count whenever EXPOSURE is high (plain
// intensity imaging).
//
// Interface: spad[r][c]   - SPAD pulses, one per pixel
//            exposure     - global exposure enable (from the MCU)
//            gate_en      - 1: apply the time gates; 0: count all events
//            interleave   - gate B on odd columns
//            gate_a/b     - time gates from the gate generator
//            row_rst[r]   - reset row r (active high), rst_all resets every row
//            row_sel      - row index driven onto col_data
//            col_data[c]  - count of pixel (row_sel, c), combinational
module pixel_array #(
  parameter int unsigned COLS  = sensor_pkg::COLS,
  parameter int unsigned ROWS  = sensor_pkg::ROWS,
  parameter int unsigned CNT_W = sensor_pkg::CNT_W
) (
  input  logic [ROWS-1:0][COLS-1:0]            spad,
  input  logic                                 exposure,
  input  logic                                 gate_en,
  input  logic                                 interleave,
  input  logic                                 gate_a,
  input  logic                                 gate_b,
  input  logic [ROWS-1:0]                      row_rst,
  input  logic                                 rst_all,
  input  logic [$clog2(ROWS)-1:0]              row_sel,
  output logic [COLS-1:0][CNT_W-1:0]           col_data
);

  logic [ROWS-1:0][COLS-1:0][CNT_W-1:0] cnt;
  logic [COLS-1:0]                      col_en;

  for (genvar c = 0; c < COLS; c++) begin : g_col_en
    if (c % 2 == 1) begin : g_odd
      assign col_en[c] = exposure & (!gate_en | (interleave ? gate_b : gate_a));
    end else begin : g_even
      assign col_en[c] = exposure & (!gate_en | gate_a);
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic rrst;
    assign rrst = row_rst[r] | rst_all;
    for (genvar c = 0; c < COLS; c++) begin : g_pix
      spad_pixel #(.CNT_W(CNT_W)) u_pix (
        .spad  (spad[r][c]),
        .en    (col_en[c]),
        .rst   (rrst),
        .count (cnt[r][c])
      );
    end
  end

  always_comb begin
    col_data = '0;
    for (int r = 0; r < ROWS; r++)
      if (row_sel == r[$clog2(ROWS)-1:0]) col_data = cnt[r];
  end

endmodule
