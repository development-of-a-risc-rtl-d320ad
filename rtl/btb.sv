// btb: branch predictor and branch target buffer of the Ifetch stage.
// ENTRIES entries (32, as in the document), each holding a valid bit, the
// tag of the branch PC, its last target and a 2-bit saturating counter
// (the document's predictor). Lookup is combinational on the fetch PC: on a
// hit whose counter is 2 or 3 (weakly/strongly taken) the fetch unit
// redirects to the stored target. The Execute stage updates the buffer with
// the resolved outcome of every branch and jump: a taken branch not in the
// buffer is allocated with counter 2, a resolved branch moves its counter up
// or down by one, saturating. The buffer is direct-mapped on PC[6:2]; that
// organisation and the allocation rule are this design's choice.
module btb #(
  parameter int unsigned ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup (Ifetch)
  input  logic [31:0] f_pc,
  output logic        f_taken,
  output logic [31:0] f_target,
  // update (Execute)
  input  logic        u_valid,
  input  logic [31:0] u_pc,
  input  logic        u_taken,
  input  logic [31:0] u_target
);
  localparam int IW = $clog2(ENTRIES);
  localparam int TW = 30 - IW;

  logic          v   [ENTRIES];
  logic [TW-1:0] tag [ENTRIES];
  logic [31:0]   tgt [ENTRIES];
  logic [1:0]    ctr [ENTRIES];

  logic [IW-1:0] fi, ui;
  assign fi = f_pc[IW+1:2];
  assign ui = u_pc[IW+1:2];

  assign f_taken  = v[fi] && tag[fi] == f_pc[31:IW+2] && ctr[fi][1];
  assign f_target = tgt[fi];

  logic u_hit;
  assign u_hit = v[ui] && tag[ui] == u_pc[31:IW+2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        v[i] <= 1'b0; tag[i] <= '0; tgt[i] <= '0; ctr[i] <= 2'd0;
      end
    end else if (u_valid) begin
      if (u_hit) begin
        if (u_taken) begin
          tgt[ui] <= u_target;
          if (ctr[ui] != 2'd3) ctr[ui] <= ctr[ui] + 2'd1;
        end else if (ctr[ui] != 2'd0) begin
          ctr[ui] <= ctr[ui] - 2'd1;
        end
      end else if (u_taken) begin
        v[ui]   <= 1'b1;
        tag[ui] <= u_pc[31:IW+2];
        tgt[ui] <= u_target;
        ctr[ui] <= 2'd2;
      end
    end
  end
endmodule
