// packet_queue: queue of tagged cells held in a memory, for models in which
// cells carry information (source, priority, time stamp ...).
//
// Unlike slot_queue, which only counts cells, this queue stores a TAG_W-bit
// tag per cell in a circular buffer of DEPTH words (the buffer capacity).
// Because up to NIN cells may arrive in the same slot and a memory takes one
// write per clock, one slot is spread over SLOT_CYCLES = NIN + 1 clocks:
//   phase 0         the slot's arrivals (`arr_valid`, `arr_tag`) and service
//                   request (`service`) are sampled; if the queue is not
//                   empty and service is requested the head cell leaves:
//                   `dep_valid`/`dep_tag` are registered and valid from
//                   phase 1 until the next phase 1;
//   phase 1 .. NIN  arrival k-1 is written if present; if the buffer is full
//                   it is lost (`loss` pulses for one clock).
// So service comes before arrivals inside a slot, and a cell can leave at
// the earliest in the slot after its arrival. `slot_start` is high in
// phase 0, the clock at which the inputs are sampled.
//
// Interface: `run` lets the phases advance; `count` is the number of stored
// cells. Reset empties the queue.
// Storing cells in a memory of the queue's capacity, and writing several
// arrivals over several clocks of one slot, follow the reference design; the
// phase order and the handshake are this design's choices.
module packet_queue #(
  parameter int unsigned NIN   = 4,
  parameter int unsigned DEPTH = 300,
  parameter int unsigned TAG_W = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW   = $clog2(NIN + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  output logic                      slot_start,
  input  logic [NIN-1:0]            arr_valid,
  input  logic [NIN-1:0][TAG_W-1:0] arr_tag,
  input  logic                      service,
  output logic                      dep_valid,
  output logic [TAG_W-1:0]          dep_tag,
  output logic                      loss,
  output logic [AW:0]               count
);

  logic [TAG_W-1:0]          mem [DEPTH];
  logic [PW-1:0]             phase;
  logic [AW-1:0]             head, tail;
  logic [NIN-1:0]            pend_valid;
  logic [NIN-1:0][TAG_W-1:0] pend_tag;
  logic                      do_read, do_write;
  logic [PW-1:0]             k;
  logic                      pend_now;
  logic [TAG_W-1:0]          pend_tag_now;

  assign slot_start = run && (phase == '0);
  assign k          = phase - 1'b1;
  assign do_read    = slot_start && service && (count != '0);
  assign do_write   = run && (phase != '0) && pend_now && (32'(count) < DEPTH);

  // Arrival handled in the present phase (phase k + 1 handles arrival k).
  always_comb begin
    pend_now     = 1'b0;
    pend_tag_now = '0;
    for (int i = 0; i < NIN; i++) begin
      if (32'(k) == i) begin
        pend_now     = pend_valid[i];
        pend_tag_now = pend_tag[i];
      end
    end
  end

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      head       <= '0;
      tail       <= '0;
      count      <= '0;
      pend_valid <= '0;
      dep_valid  <= 1'b0;
      dep_tag    <= '0;
      loss       <= 1'b0;
    end else if (run) begin
      phase <= (32'(phase) == NIN) ? '0 : phase + 1'b1;
      loss  <= 1'b0;
      if (slot_start) begin
        pend_valid <= arr_valid;
        pend_tag   <= arr_tag;
        dep_valid  <= do_read;
        if (do_read) begin
          dep_tag <= mem[head];
          head    <= incr(head);
          count   <= count - 1'b1;
        end
      end else begin
        if (do_write) begin
          tail  <= incr(tail);
          count <= count + 1'b1;
        end
        loss <= pend_now && !do_write;
      end
    end else begin
      loss <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (do_write) mem[tail] <= pend_tag_now;
  end

endmodule
