// decoder_ctrl: phase sequencer of the parallel-serial LDPC decoder.
//
// A frame runs as: LOAD (DELTA cycles, one prior per unit per cycle, taken
// when llr_valid_i is high), then iterations of
//   C2B    DELTA*GAMMA cycles, one check per cycle, row group g outer,
//          row r inner (c2b_lane_o = g, c2b_row_o = r)
//   STALL1 C2B_LAT cycles so the last M1 writes land before M1 is read
//   B2C    DELTA*GAMMA cycles, one edge per cycle, bit b outer, lane g inner
//   STALL2 B2C_LAT cycles so the last M0 writes land before M0 is read
// then DONE for one cycle (done_o) and back to IDLE. The stalls give the
// read-before-write consistency between the two operations.
// Stopping rule: the frame ends after iteration iter_limit_i (0 counts as
// 1). From the second iteration on, the check node also returns the parity
// of the previous iteration's hard decisions for every check; if all
// checks are satisfied at the end of C2B the frame ends there with
// converged_o = 1 and the B2C is skipped. stop_i aborts a frame at once.
// With iter_limit_i = 1 a frame takes DELTA + 2*DELTA*GAMMA + C2B_LAT +
// B2C_LAT + 1 = 844 cycles from the first load cycle at the default sizes.
// The phase order, the stall and the iteration limit are from the decoder
// description; the early-stopping test and the handshake are this
// design's choice.
module decoder_ctrl
  import ldpc_pkg::ITW, ldpc_pkg::phase_t, ldpc_pkg::PH_IDLE, ldpc_pkg::PH_LOAD,
         ldpc_pkg::PH_C2B, ldpc_pkg::PH_STALL1, ldpc_pkg::PH_B2C, ldpc_pkg::PH_STALL2,
         ldpc_pkg::PH_DONE;
#(
  parameter int unsigned DELTA   = ldpc_pkg::DELTA,
  parameter int unsigned GAMMA   = ldpc_pkg::GAMMA,
  parameter int unsigned C2B_LAT = 3,
  parameter int unsigned B2C_LAT = ldpc_pkg::GAMMA + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_i,
  input  logic                     stop_i,
  input  logic [ITW-1:0]           iter_limit_i,
  // prior loading
  input  logic                     llr_valid_i,
  output logic                     llr_ready_o,
  output logic                     load_en_o,
  output logic [$clog2(DELTA)-1:0] load_bit_o,
  // check-to-bit issue
  output logic                     c2b_en_o,
  output logic [$clog2(GAMMA)-1:0] c2b_lane_o,
  output logic [$clog2(DELTA)-1:0] c2b_row_o,
  // bit-to-check issue
  output logic                     b2c_en_o,
  output logic [$clog2(DELTA)-1:0] b2c_bit_o,
  output logic [$clog2(GAMMA)-1:0] b2c_lane_o,
  // decision parity from the check node
  input  logic                     par_valid_i,
  input  logic                     par_i,
  // status
  output phase_t                   phase_o,
  output logic [ITW-1:0]           iter_o,
  output logic                     busy_o,
  output logic                     stall_o,
  output logic                     done_o,
  output logic                     converged_o
);
  localparam int unsigned DW = $clog2(DELTA);
  localparam int unsigned GW = $clog2(GAMMA);
  localparam int unsigned STW = $clog2((C2B_LAT > B2C_LAT ? C2B_LAT : B2C_LAT) + 1);

  phase_t         phase;
  logic [DW-1:0]  bcnt;     // load bit / c2b row / b2c bit
  logic [GW-1:0]  gcnt;     // c2b row group / b2c lane
  logic [STW-1:0] scnt;
  logic [ITW-1:0] iter, limit;
  logic           unsat, unsat_next, conv;

  assign limit      = (iter_limit_i == '0) ? ITW'(1) : iter_limit_i;
  assign unsat_next = unsat | (par_valid_i & par_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      bcnt  <= '0;
      gcnt  <= '0;
      scnt  <= '0;
      iter  <= '0;
      unsat <= 1'b0;
      conv  <= 1'b0;
    end else if (stop_i) begin
      phase <= PH_IDLE;
    end else begin
      unsat <= unsat_next;
      case (phase)
        PH_IDLE, PH_DONE: begin
          phase <= PH_IDLE;
          if (start_i) begin
            phase <= PH_LOAD;
            bcnt  <= '0;
            iter  <= ITW'(1);
            conv  <= 1'b0;
          end
        end
        PH_LOAD: if (llr_valid_i) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == DW'(DELTA - 1)) begin
            phase <= PH_C2B;
            bcnt  <= '0;
            gcnt  <= '0;
            unsat <= 1'b0;
          end
        end
        PH_C2B: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == DW'(DELTA - 1)) begin
            gcnt <= gcnt + 1'b1;
            if (gcnt == GW'(GAMMA - 1)) begin
              phase <= PH_STALL1;
              scnt  <= '0;
            end
          end
        end
        PH_STALL1: begin
          scnt <= scnt + 1'b1;
          if (scnt == STW'(C2B_LAT - 1)) begin
            if (iter > ITW'(1) && !unsat_next) begin
              phase <= PH_DONE;
              conv  <= 1'b1;
            end else begin
              phase <= PH_B2C;
              bcnt  <= '0;
              gcnt  <= '0;
            end
          end
        end
        PH_B2C: begin
          gcnt <= gcnt + 1'b1;
          if (gcnt == GW'(GAMMA - 1)) begin
            gcnt <= '0;
            bcnt <= bcnt + 1'b1;
            if (bcnt == DW'(DELTA - 1)) begin
              phase <= PH_STALL2;
              scnt  <= '0;
            end
          end
        end
        PH_STALL2: begin
          scnt <= scnt + 1'b1;
          if (scnt == STW'(B2C_LAT - 1)) begin
            if (iter >= limit) begin
              phase <= PH_DONE;
            end else begin
              phase <= PH_C2B;
              iter  <= iter + 1'b1;
              bcnt  <= '0;
              gcnt  <= '0;
              unsat <= 1'b0;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    llr_ready_o = (phase == PH_LOAD);
    load_en_o   = (phase == PH_LOAD) && llr_valid_i;
    load_bit_o  = bcnt;
    c2b_en_o    = (phase == PH_C2B);
    c2b_lane_o  = gcnt;
    c2b_row_o   = bcnt;
    b2c_en_o    = (phase == PH_B2C);
    b2c_bit_o   = bcnt;
    b2c_lane_o  = gcnt;
  end

  assign phase_o     = phase;
  assign iter_o      = iter;
  assign busy_o      = (phase != PH_IDLE);
  assign stall_o     = (phase == PH_STALL1) || (phase == PH_STALL2);
  assign done_o      = (phase == PH_DONE);
  assign converged_o = conv;
endmodule
