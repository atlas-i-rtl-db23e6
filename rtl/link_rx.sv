// link_rx: input side of a link; separates cells and credits in a character
// stream.
//
// Takes one decoded character per clock. A begin-of-cell control character
// starts a cell; the next 53 data bytes are collected (header first) and the
// whole cell is then handed to the switch core in one cycle. A credit control
// character makes the next data byte a flow-group number, which is passed on
// as a received credit at once, even when it arrives in the middle of a cell;
// that byte is not part of the cell. Idle characters are ignored. A cell cut
// short by a new begin-of-cell, or a data byte outside a cell or credit, is
// discarded and reported on err. Credit extraction from dedicated control
// characters follows the chip description of its links; the character codes
// and the rest are choices of this design.
//
// Timing: cell_valid pulses for one cycle, the cycle after the last byte was
// received; cr_valid pulses the cycle after the flow-group byte.
module link_rx
  import atlas_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  link_char_t       ch,
  output logic             cell_valid,
  output atm_cell_t        cell_data,
  output logic             cr_valid,
  output logic [FG_W-1:0]  cr_fg,
  output logic             err
);
  logic       in_cell, want_fg;
  logic [5:0] cnt;            // bytes of the current cell received
  logic [CELL_W-1:0] sh;

  assign cell_data = atm_cell_t'(sh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cell    <= 1'b0;
      want_fg    <= 1'b0;
      cnt        <= '0;
      sh         <= '0;
      cell_valid <= 1'b0;
      cr_valid   <= 1'b0;
      cr_fg      <= '0;
      err        <= 1'b0;
    end else begin
      cell_valid <= 1'b0;
      cr_valid   <= 1'b0;
      err        <= 1'b0;
      if (ch.ctrl) begin
        if (ch.data == CH_BOC) begin
          err     <= in_cell || want_fg;
          in_cell <= 1'b1;
          want_fg <= 1'b0;
          cnt     <= '0;
        end else if (ch.data == CH_CREDIT) begin
          err     <= want_fg;
          want_fg <= 1'b1;
        end
      end else if (want_fg) begin
        want_fg  <= 1'b0;
        cr_valid <= 1'b1;
        cr_fg    <= ch.data[FG_W-1:0];
      end else if (in_cell) begin
        sh  <= {sh[CELL_W-9:0], ch.data};
        cnt <= cnt + 6'd1;
        if (cnt == 6'(CELL_BYTES - 1)) begin
          in_cell    <= 1'b0;
          cell_valid <= 1'b1;
        end
      end else begin
        err <= 1'b1;
      end
    end
  end
endmodule
