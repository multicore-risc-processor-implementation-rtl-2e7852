// bht: branch history table, 64 rows of 2-bit saturating counters.
//
// Indexed by word address bits pc[7:2]. The fetch stage reads the counter of
// the instruction it fetches (rd_pc -> pred_taken = counter[1]); the decode
// stage, where the branch is resolved, updates the counter of the branch it
// holds (wr_pc, wr_en, taken): up on taken, down on not taken, saturating at
// 0 and 3. Counters reset to 1 (weakly not taken). The size, 2 bits by 64
// rows, is the one printed in the core diagram; the counter rule, the index
// bits and the reset value are this design's choices.
module bht #(
  parameter int unsigned ROWS = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rd_pc,
  output logic        pred_taken,
  input  logic        wr_en,
  input  logic [31:0] wr_pc,
  input  logic        taken
);
  localparam int unsigned IW = $clog2(ROWS);
  logic [1:0] cnt [ROWS];
  logic [IW-1:0] ri, wi;

  assign ri = rd_pc[IW+1:2];
  assign wi = wr_pc[IW+1:2];
  assign pred_taken = cnt[ri][1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ROWS; i++) cnt[i] <= 2'd1;
    end else if (wr_en) begin
      if (taken && cnt[wi] != 2'd3)       cnt[wi] <= cnt[wi] + 2'd1;
      else if (!taken && cnt[wi] != 2'd0) cnt[wi] <= cnt[wi] - 2'd1;
    end
  end
endmodule
