// refresh_ctrl: schedules DRAM refresh. Every INTERVAL cycles it requests the refresh of one
// half row, named by row and par; the request stays up until ack. The halves are visited in the
// order (row 0, even), (row 0, odd), (row 1, even), ... so refresh alternates between the even
// and odd columns, and every cell is restored once per 2*ROWS*INTERVAL cycles (plus any cycles
// a request waits). Alternating parities follows the paper; the interval, the order of rows and
// the request/acknowledge handshake are this design's choice.
module refresh_ctrl #(
  parameter int unsigned ROWS     = vmm_pkg::ROWS_D,
  parameter int unsigned INTERVAL = 64,
  localparam int unsigned RW      = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          req,
  input  logic          ack,
  output logic [RW-1:0] row,
  output vmm_pkg::par_e par
);
  import vmm_pkg::*;
  logic [$clog2(INTERVAL+1)-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
      req   <= 1'b0;
      row   <= '0;
      par   <= PAR_EVEN;
    end else begin
      if (timer == $bits(timer)'(INTERVAL - 1)) begin
        timer <= '0;
        req   <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
      if (req && ack) begin
        if (timer != $bits(timer)'(INTERVAL - 1)) req <= 1'b0;
        par <= (par == PAR_EVEN) ? PAR_ODD : PAR_EVEN;
        if (par == PAR_ODD) row <= (row == RW'(ROWS - 1)) ? '0 : row + 1'b1;
      end
    end
  end

  a_ack_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);
endmodule
