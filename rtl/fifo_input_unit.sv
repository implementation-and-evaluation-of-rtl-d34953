// fifo_input_unit: one input port of the FIFO-buffered router.
//
// Arriving packets are stored, in arrival order, in one circular queue of
// BLOCKS packet-sized blocks held in a two-port RAM. The unit raises
// `request` while the queue is not empty and shows the destination of the
// packet at the head of the queue on `req_addr`; a grant pulse from the
// arbiter makes it read that packet out to the switching core.
//
// Three cooperating processes, as in the classic FIFO input unit:
//  * write controller (S0/S1/S2): on sf_in in S0 it checks for a full
//    buffer (not empty and head == tail) and drops the packet if so;
//    otherwise it writes phit 0 to {tail, 0}, records the destination
//    (phit 0, low bits) in the address table and moves on; S1 writes phit 1,
//    S2 the remaining phits until the phit counter reaches PKT_PHITS-1.
//  * read controller (S0/S1/S2): on a grant in S0 it starts reading the
//    head block at {head, 0} and advances head; in S1 phit 0 is on data_out
//    together with sf_out; S2 reads the rest.
//  * empty-flag update: clears `empty` when a write starts and sets it when
//    the last stored packet starts to be read.
//
// Timing: a packet whose sf arrives in cycle t is written in cycles
// t..t+PKT_PHITS-1 and requests from cycle t+1. A grant seen in cycle g puts
// sf_out and phit 0 on the outputs in cycle g+1 and phit k in cycle g+1+k;
// the unit accepts the next grant in cycle g+PKT_PHITS. A packet may be
// granted while it is still being written (cut-through): reading starts
// later than writing and proceeds at the same rate.
//
// Own choices where the description leaves room: the tail pointer advances
// in the cycle the write starts (not one cycle later), the full test is
// "not empty and head == tail", and grants that arrive while the unit is
// busy or empty are ignored (an assertion flags them).
module fifo_input_unit
  import router_pkg::*;
#(
  parameter int unsigned N         = 128,  // router ports
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned PKT_PHITS = 32,
  parameter int unsigned BLOCKS    = 128,  // packet blocks in the buffer
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned BW = $clog2(BLOCKS),
  localparam int unsigned CW = $clog2(PKT_PHITS)
) (
  input  logic              clk,
  input  logic              rst,
  // from the link
  input  logic              sf_in,
  input  logic [PHIT_W-1:0] data_in,
  // to / from the arbiter
  output logic              request,
  output logic [AW-1:0]     req_addr,
  input  logic              grant,
  // to the switching core
  output logic              sf_out,
  output logic [PHIT_W-1:0] data_out,
  // statistics
  output logic              drop
);

  initial begin
    assert (PHIT_W >= AW) else $error("phit too narrow for the destination address");
    assert (2**BW == BLOCKS && 2**CW == PKT_PHITS) else $error("BLOCKS and PKT_PHITS must be powers of two");
  end

  ctrl_state_e        wr_state, rd_state;
  logic [BW-1:0]      head, tail, wr_blk, rd_blk;
  logic [CW-1:0]      wr_cnt, rd_cnt;
  logic               empty, full;
  logic [AW-1:0]      addr_table [BLOCKS];

  logic               wr_start, rd_start, wr_en, rd_en;
  logic [BW+CW-1:0]   wr_addr, rd_addr;

  assign full     = !empty && (head == tail);
  assign wr_start = (wr_state == CTRL_S0) && sf_in && !full;
  assign rd_start = (rd_state == CTRL_S0) && grant && !empty;
  assign drop     = (wr_state == CTRL_S0) && sf_in && full;

  // memory ports
  assign wr_en   = wr_start || (wr_state != CTRL_S0);
  assign wr_addr = (wr_state == CTRL_S0) ? {tail, CW'(0)} : {wr_blk, wr_cnt};
  assign rd_en   = rd_start || (rd_state != CTRL_S0);
  assign rd_addr = (rd_state == CTRL_S0) ? {head, CW'(0)} : {rd_blk, rd_cnt};

  dual_port_ram #(.DEPTH(BLOCKS * PKT_PHITS), .WIDTH(PHIT_W)) u_buf (
    .clk, .wr_en, .wr_addr, .data_in,
    .rd_en, .rd_addr, .data_out
  );

  // write controller
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_state <= CTRL_S0;
      tail     <= '0;
      wr_blk   <= '0;
      wr_cnt   <= '0;
    end else begin
      unique case (wr_state)
        CTRL_S0: if (wr_start) begin
          addr_table[tail] <= data_in[AW-1:0];
          wr_blk   <= tail;
          tail     <= tail + 1'b1;
          wr_cnt   <= CW'(1);
          wr_state <= CTRL_S1;
        end
        CTRL_S1: begin
          wr_cnt   <= wr_cnt + 1'b1;
          wr_state <= (wr_cnt == CW'(PKT_PHITS - 1)) ? CTRL_S0 : CTRL_S2;
        end
        default: begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == CW'(PKT_PHITS - 1)) wr_state <= CTRL_S0;
        end
      endcase
    end
  end

  // read controller
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_state <= CTRL_S0;
      head     <= '0;
      rd_blk   <= '0;
      rd_cnt   <= '0;
    end else begin
      unique case (rd_state)
        CTRL_S0: if (rd_start) begin
          rd_blk   <= head;
          head     <= head + 1'b1;
          rd_cnt   <= CW'(1);
          rd_state <= CTRL_S1;
        end
        CTRL_S1: begin
          rd_cnt   <= rd_cnt + 1'b1;
          rd_state <= (rd_cnt == CW'(PKT_PHITS - 1)) ? CTRL_S0 : CTRL_S2;
        end
        default: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == CW'(PKT_PHITS - 1)) rd_state <= CTRL_S0;
        end
      endcase
    end
  end

  // buffer state update (empty flag)
  always_ff @(posedge clk) begin
    if (rst) empty <= 1'b1;
    else if (wr_start && !rd_start) empty <= 1'b0;
    else if (rd_start && !wr_start && (BW'(head + 1'b1) == tail)) empty <= 1'b1;
  end

  assign request  = !empty;
  assign req_addr = addr_table[head];
  assign sf_out   = (rd_state == CTRL_S1);

  a_grant_when_ready: assert property (@(posedge clk) disable iff (rst)
    grant |-> (rd_state == CTRL_S0 && !empty))
    else $error("fifo_input_unit: grant while busy or empty");

endmodule
