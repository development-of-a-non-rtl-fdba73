// iteration_controller: sequences one decode and enforces the iteration limit.
//
// States: IDLE -> VN -> CN -> VN -> CN ... -> DONE.
//   start (in IDLE or DONE): load goes high for one cycle (capture the LLRs,
//       clear the check-node messages), the iteration count is cleared.
//   VN:  vn_en is high; the variable nodes update their messages and hard
//        decisions.
//   CN:  the syndrome of the hard decisions just made is examined. If it is
//        zero, or IMAX check-node updates have already been made, the decode
//        ends (done, success = syn_zero). Otherwise cn_en is high, the check
//        nodes update and the count increments.
// One iteration therefore takes two clock cycles, and done rises 2 + 2k clock
// edges after start is sampled, where k (0..IMAX) is the final count.
//
// The stop rule "count has reached the limit or the check equations are all
// zero" and the limit of 6 follow the original design; the two-state
// iteration, start strobe and success flag are this design's own. Reset is
// synchronous and active high. start is ignored while a decode is running.
module iteration_controller #(
  parameter int IMAX = 6
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic                        syn_zero,
  output logic                        load,
  output logic                        vn_en,
  output logic                        cn_en,
  output logic                        busy,
  output logic                        done,
  output logic                        success,
  output logic [$clog2(IMAX+1)-1:0]   iterations
);
  typedef enum logic [1:0] {IDLE, VN, CN, FIN} state_t;

  localparam int CW = $clog2(IMAX + 1);

  state_t        state;
  logic [CW-1:0] count;
  logic          stop;

  assign stop  = syn_zero || (count == CW'(IMAX));
  assign load  = start && (state == IDLE || state == FIN);
  assign vn_en = (state == VN);
  assign cn_en = (state == CN) && !stop;
  assign busy  = (state == VN) || (state == CN);
  assign iterations = count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      count   <= '0;
      done    <= 1'b0;
      success <= 1'b0;
    end else begin
      unique case (state)
        IDLE, FIN: begin
          if (start) begin
            state   <= VN;
            count   <= '0;
            done    <= 1'b0;
            success <= 1'b0;
          end
        end
        VN: state <= CN;
        CN: begin
          if (stop) begin
            state   <= FIN;
            done    <= 1'b1;
            success <= syn_zero;
          end else begin
            state <= VN;
            count <= count + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A decode never runs past the limit.
  a_limit: assert property (@(posedge clk) disable iff (rst) count <= CW'(IMAX));
  // done and busy are exclusive.
  a_excl: assert property (@(posedge clk) disable iff (rst) !(done && busy));
endmodule
