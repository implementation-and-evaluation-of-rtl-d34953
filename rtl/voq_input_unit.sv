// voq_input_unit: one input port of the VOQ-buffered routers.
//
// The buffer of BLOCKS packet blocks is shared dynamically by N virtual
// output queues, one per output port, plus a free-space queue that owns
// every unused block. Each queue is a linked list: a head and a tail
// register and an empty flag per queue, and one `next` register per block
// that names the following block of the same queue. Each non-empty queue
// raises its own request bit, so packets for idle outputs are not held up
// behind a packet for a busy one.
//
// Three processes:
//  * write controller (S0/S1/S2): on sf_in in S0, if the free-space queue is
//    empty the packet is dropped; otherwise phit 0 goes to {free_head, 0},
//    the destination (phit 0, low bits) is kept, S1 writes phit 1 and S2
//    the rest.
//  * read controller (S0/S1/S2): on a one-hot grant in S0 it picks the
//    granted queue, reads its head block from {queue_head, 0}; S1 drives
//    sf_out with phit 0, S2 the rest.
//  * linked-list update, active in state S1 of either controller: on the
//    write side it moves the block just filled from the head of the
//    free-space queue to the tail of the destination queue; on the read side
//    it moves the block being read from the head of its queue to the tail of
//    the free-space queue. Both moves may happen in the same cycle; the
//    read-side move then sees the lists as the write-side move left them.
//
// Reset puts every block in the free-space queue in address order
// (next[b] = b+1, free head 0, free tail BLOCKS-1) and marks every virtual
// queue empty.
//
// Timing: as the FIFO unit. sf in cycle t: the packet is linked to its queue
// in cycle t+1 and requests from cycle t+2. Grant in cycle g: sf_out and
// phit 0 in cycle g+1, phit k in g+1+k, next grant accepted in g+PKT_PHITS.
// The free tail reset value and same-cycle ordering of the two list moves
// are this design's own choices.
module voq_input_unit
  import router_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned PKT_PHITS = 32,
  parameter int unsigned BLOCKS    = 128,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned BW = $clog2(BLOCKS),
  localparam int unsigned CW = $clog2(PKT_PHITS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sf_in,
  input  logic [PHIT_W-1:0] data_in,
  output logic [N-1:0]      request,   // request[j]: queue for output j not empty
  input  logic [N-1:0]      grant,     // one-hot (or zero) grant of a queue
  output logic              sf_out,
  output logic [PHIT_W-1:0] data_out,
  output logic              drop
);

  initial begin
    assert (PHIT_W >= AW) else $error("phit too narrow for the destination address");
    assert (2**BW == BLOCKS && 2**CW == PKT_PHITS && 2**AW == N)
      else $error("N, BLOCKS and PKT_PHITS must be powers of two");
  end

  ctrl_state_e      wr_state, rd_state;
  logic [CW-1:0]    wr_cnt, rd_cnt;
  logic [BW-1:0]    wr_blk, rd_blk;
  logic [AW-1:0]    dest_port, rd_queue;

  // linked-list registers
  logic [BW-1:0]    next_blk [BLOCKS];
  logic [BW-1:0]    q_head   [N];
  logic [BW-1:0]    q_tail   [N];
  logic [N-1:0]     q_empty;
  logic [BW-1:0]    fs_head, fs_tail;
  logic             fs_empty;

  logic             wr_start, rd_start, wr_en, rd_en, wr_link, rd_link;
  logic [AW-1:0]    grant_q;
  logic [BW+CW-1:0] wr_addr, rd_addr;

  always_comb begin
    grant_q = '0;
    for (int j = N - 1; j >= 0; j--) if (grant[j]) grant_q = AW'(j);
  end

  assign wr_start = (wr_state == CTRL_S0) && sf_in && !fs_empty;
  assign drop     = (wr_state == CTRL_S0) && sf_in && fs_empty;
  assign rd_start = (rd_state == CTRL_S0) && (grant != '0);
  assign wr_link  = (wr_state == CTRL_S1);
  assign rd_link  = (rd_state == CTRL_S1);

  assign wr_en   = wr_start || (wr_state != CTRL_S0);
  assign wr_addr = (wr_state == CTRL_S0) ? {fs_head, CW'(0)} : {wr_blk, wr_cnt};
  assign rd_en   = rd_start || (rd_state != CTRL_S0);
  assign rd_addr = (rd_state == CTRL_S0) ? {q_head[grant_q], CW'(0)} : {rd_blk, rd_cnt};

  dual_port_ram #(.DEPTH(BLOCKS * PKT_PHITS), .WIDTH(PHIT_W)) u_buf (
    .clk, .wr_en, .wr_addr, .data_in,
    .rd_en, .rd_addr, .data_out
  );

  // write controller
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_state  <= CTRL_S0;
      wr_cnt    <= '0;
      wr_blk    <= '0;
      dest_port <= '0;
    end else begin
      unique case (wr_state)
        CTRL_S0: if (wr_start) begin
          wr_blk    <= fs_head;
          dest_port <= data_in[AW-1:0];
          wr_cnt    <= CW'(1);
          wr_state  <= CTRL_S1;
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
      rd_cnt   <= '0;
      rd_blk   <= '0;
      rd_queue <= '0;
    end else begin
      unique case (rd_state)
        CTRL_S0: if (rd_start) begin
          rd_queue <= grant_q;
          rd_blk   <= q_head[grant_q];
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

  // linked-list update
  always_ff @(posedge clk) begin
    logic [BW-1:0] fh, ft, qt, nc;
    logic          fe;
    if (rst) begin
      for (int b = 0; b < BLOCKS; b++) next_blk[b] <= BW'(b + 1);
      for (int q = 0; q < N; q++) begin
        q_head[q] <= '0;
        q_tail[q] <= '0;
      end
      q_empty  <= '1;
      fs_head  <= '0;
      fs_tail  <= BW'(BLOCKS - 1);
      fs_empty <= 1'b0;
    end else begin
      fh = fs_head;
      ft = fs_tail;
      fe = fs_empty;
      // write side: free head block -> tail of the destination queue
      if (wr_link) begin
        if (q_empty[dest_port]) begin
          q_head[dest_port]  <= wr_blk;
          q_empty[dest_port] <= 1'b0;
        end else begin
          next_blk[q_tail[dest_port]] <= wr_blk;
        end
        q_tail[dest_port] <= wr_blk;
        if (fh == ft) fe = 1'b1;
        else          fh = next_blk[fh];
      end
      // read side: head block of the granted queue -> tail of the free queue
      if (rd_link) begin
        if (wr_link && dest_port == rd_queue) begin
          qt = wr_blk;
          nc = q_empty[rd_queue] ? next_blk[rd_blk]
             : (q_tail[rd_queue] == rd_blk) ? wr_blk : next_blk[rd_blk];
        end else begin
          qt = q_tail[rd_queue];
          nc = next_blk[rd_blk];
        end
        if (rd_blk == qt) q_empty[rd_queue] <= 1'b1;
        else              q_head[rd_queue]  <= nc;
        if (fe) begin
          fh = rd_blk;
          ft = rd_blk;
          fe = 1'b0;
        end else begin
          next_blk[ft] <= rd_blk;
          ft = rd_blk;
        end
      end
      fs_head  <= fh;
      fs_tail  <= ft;
      fs_empty <= fe;
    end
  end

  assign request = ~q_empty;
  assign sf_out  = (rd_state == CTRL_S1);

  a_grant_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant))
    else $error("voq_input_unit: more than one queue granted");
  a_grant_valid: assert property (@(posedge clk) disable iff (rst)
    (grant != '0) |-> (rd_state == CTRL_S0 && (grant & ~request) == '0))
    else $error("voq_input_unit: grant while busy or to an empty queue");

endmodule
