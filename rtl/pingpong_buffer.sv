// pingpong_buffer: two-bank buffer between the circuit emulator and the
// CNF checking engines.
//
// The emulator writes the observed wire values of one (input, key) pair into
// one bank while the checking engines read the other, so emulation of the
// next pair overlaps the checking of the current one. Each bank has a full
// flag. Write side: wr_ready is high while the bank the writer points at is
// empty; wr_valid & wr_ready stores wr_data there and moves the writer to
// the other bank. Read side: rd_valid is high while the bank the reader
// points at is full, rd_data shows it, and a pulse on rd_release empties the
// bank and moves the reader to the other one. Both flags reset to empty.
//
// The two-bank decoupling follows the design; the valid/ready handshake is
// this design's own.
module pingpong_buffer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_release
);
  logic [W-1:0] bank [2];
  logic [1:0]   full;
  logic         wsel, rsel;

  assign wr_ready = !full[wsel];
  assign rd_valid = full[rsel];
  assign rd_data  = bank[rsel];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) bank[wsel] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0;
      wsel <= 1'b0;
      rsel <= 1'b0;
    end else begin
      if (wr_valid && wr_ready) wsel <= ~wsel;
      if (rd_release && rd_valid) rsel <= ~rsel;
      for (int b = 0; b < 2; b++) begin
        if (wr_valid && wr_ready && wsel == b[0])     full[b] <= 1'b1;
        else if (rd_release && rd_valid && rsel == b[0]) full[b] <= 1'b0;
      end
    end
  end

  // A bank is released only while it holds data.
  a_release_full: assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_valid);
endmodule
