// Turbo decoder controller: frame loading, iteration schedule, stopping
// rule and result read-out.
//
// Loading: accepts N channel samples (in_valid, natural order) and produces
// their bank/row address in the banked memories (address = bank*M + row).
// Decoding: runs iterations of two half-iterations, phase 0 (in-order, first
// constituent code) then phase 1 (interleaved, second constituent code). Each
// half-iteration is one pulse on siso_start followed by waiting for
// siso_done. The first half-iteration of a frame has no a-priori information
// (first_half forces it to zero) and starts with new_frame set.
// Stopping: after each iteration's interleaved half the hard decisions are
// written back; dec_change reports a decision that differs from the previous
// iteration's. Decoding stops when an iteration (from the second on) changed
// no decision (early stop), or after MAX_ITER iterations (8 in the document).
// Read-out: reads the N decisions in natural order, one per cycle, from the
// decision memory (out_rd_en / out_bank / out_row); out_valid and out_last
// are aligned with the memory's registered read data. iters_o and
// early_stop_o describe the last frame.
module turbo_controller #(
  parameter int N        = 6144,
  parameter int P        = 8,
  parameter int MAX_ITER = 8,
  localparam int M   = N / P,
  localparam int BW  = (P > 1) ? $clog2(P) : 1,
  localparam int RW  = (M > 1) ? $clog2(M) : 1,
  localparam int ITW = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // frame input
  input  logic           in_valid,
  output logic           in_ready,
  output logic           load_we,
  output logic [BW-1:0]  load_bank,
  output logic [RW-1:0]  load_row,
  // SISO array
  output logic           siso_start,
  output logic           phase,
  output logic           new_frame,
  output logic           first_half,
  input  logic           siso_done,
  input  logic           dec_change,
  // result read-out
  output logic           out_rd_en,
  output logic [BW-1:0]  out_bank,
  output logic [RW-1:0]  out_row,
  output logic           out_valid,
  output logic           out_last,
  // status
  output logic           busy,
  output logic [ITW-1:0] iters_o,
  output logic           early_stop_o
);
  typedef enum logic [2:0] {S_LOAD, S_START, S_WAIT, S_OUT} state_e;

  state_e         state;
  logic [BW-1:0]  bank;
  logic [RW-1:0]  row;
  logic [ITW-1:0] iter;
  logic           changed;
  logic           last_addr;
  logic           converged;

  assign last_addr  = (bank == BW'(P - 1)) && (row == RW'(M - 1));
  assign in_ready   = (state == S_LOAD);
  assign load_we    = in_ready && in_valid;
  assign load_bank  = bank;
  assign load_row   = row;
  assign out_rd_en  = (state == S_OUT);
  assign out_bank   = bank;
  assign out_row    = row;
  assign new_frame  = (iter == ITW'(1)) && !phase;
  assign first_half = new_frame;
  assign busy       = (state != S_LOAD);
  assign converged  = (iter >= ITW'(2)) && !(changed || dec_change);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      bank         <= '0;
      row          <= '0;
      iter         <= ITW'(1);
      phase        <= 1'b0;
      changed      <= 1'b0;
      siso_start   <= 1'b0;
      out_valid    <= 1'b0;
      out_last     <= 1'b0;
      iters_o      <= '0;
      early_stop_o <= 1'b0;
    end else begin
      siso_start <= 1'b0;
      out_valid  <= out_rd_en;
      out_last   <= out_rd_en && last_addr;
      case (state)
        S_LOAD: begin
          if (in_valid) begin
            if (row == RW'(M - 1)) begin
              row  <= '0;
              bank <= bank + 1'b1;
            end else begin
              row <= row + 1'b1;
            end
            if (last_addr) begin
              bank  <= '0;
              row   <= '0;
              iter  <= ITW'(1);
              phase <= 1'b0;
              state <= S_START;
            end
          end
        end
        S_START: begin
          siso_start <= 1'b1;
          if (phase) changed <= 1'b0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (phase && dec_change) changed <= 1'b1;
          if (siso_done) begin
            if (!phase) begin
              phase <= 1'b1;
              state <= S_START;
            end else if (converged || iter == ITW'(MAX_ITER)) begin
              iters_o      <= iter;
              early_stop_o <= converged && (iter != ITW'(MAX_ITER));
              state        <= S_OUT;
            end else begin
              iter  <= iter + 1'b1;
              phase <= 1'b0;
              state <= S_START;
            end
          end
        end
        S_OUT: begin
          if (row == RW'(M - 1)) begin
            row  <= '0;
            bank <= bank + 1'b1;
          end else begin
            row <= row + 1'b1;
          end
          if (last_addr) begin
            bank  <= '0;
            row   <= '0;
            iter  <= ITW'(1);
            phase <= 1'b0;
            state <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
