// bram_ctrl_fsm: controller of the BRAM-based integration (counter, address
// generator and ready flag).
//
// A one-cycle start_rising pulse starts a run over NUM_WORDS words. For each
// word index i the controller walks four states:
//   READ   rd_en high, rd_addr = 4*i     (input memory latches the address)
//   LATCH  in_load high                  (memory data valid, operands latched)
//   EXEC   out_load high                 (PE result captured in output reg)
//   WRITE  wr_en high, wr_addr = 4*i     (sign-extended result written)
// and then moves to the next word, or, after the last one, back to IDLE
// with ready set. A run therefore takes exactly 4*NUM_WORDS clock cycles
// from the edge that samples start_rising to the edge that sets ready.
// ready is cleared by reset and by the next start pulse; start pulses
// during a run are ignored (busy is high).
//
// Addresses are byte addresses (word i at 4*i), as seen by the AXI BRAM
// controller on the other port. The read/latch/compute/write order follows
// the design's pseudo-code; the exact state split, the one-cycle memory
// read latency and the ready behaviour are choices of this implementation.
module bram_ctrl_fsm #(
  parameter int unsigned NUM_WORDS = 100,
  parameter int unsigned ADDR_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_rising,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              in_load,
  output logic              out_load,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic              busy,
  output logic              ready
);

  localparam int unsigned CNT_W = (NUM_WORDS > 1) ? $clog2(NUM_WORDS) : 1;

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_READ  = 3'd1,
    S_LATCH = 3'd2,
    S_EXEC  = 3'd3,
    S_WRITE = 3'd4
  } state_e;

  state_e           state;
  logic [CNT_W-1:0] count;
  logic             last;

  assign last = (count == CNT_W'(NUM_WORDS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      count <= '0;
      ready <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_rising) begin
          state <= S_READ;
          count <= '0;
          ready <= 1'b0;
        end
        S_READ:  state <= S_LATCH;
        S_LATCH: state <= S_EXEC;
        S_EXEC:  state <= S_WRITE;
        S_WRITE: begin
          if (last) begin
            state <= S_IDLE;
            ready <= 1'b1;
          end else begin
            state <= S_READ;
            count <= count + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_en    = (state == S_READ);
    in_load  = (state == S_LATCH);
    out_load = (state == S_EXEC);
    wr_en    = (state == S_WRITE);
    rd_addr  = ADDR_W'(count) << 2;
    wr_addr  = ADDR_W'(count) << 2;
    busy     = (state != S_IDLE);
  end

  // ready is only ever set when the controller has returned to IDLE.
  assert property (@(posedge clk) disable iff (!rst_n) !(ready && busy));

endmodule
