// mesh_ctrl: sequencer of the routing mesh.
//
// One multiplication of the K vectors held in the nodes by the matrix is:
//   1. NC_CLEAR: all P' <- 0, all entry indices <- 0;
//   2. QDEPTH (= h*rho) iterations of
//        NC_LOAD  : every node emits its next matrix entry as a message,
//        NC_ROUTE : clockwise transposition routing, phases UP, RIGHT, DOWN,
//                   LEFT repeated, until the mesh reports that every message
//                   has been absorbed or annihilated;
//   3. NC_COMMIT: all P <- P';
//   4. the inner-product unit reads out u_j . P_i (ip_start ... ip_done).
// The host starts a run of n_mult multiplications with a one-clock start
// pulse; done pulses when the last one has finished.
//
// The loop structure follows the source design.  Ending a routing operation
// on the global empty flag, instead of after a fixed 2*m clocks, is this
// design's choice; the step count of every routing operation is kept and
// route_max/over_budget report whether any exceeded BUDGET clocks (the 2*m
// the source design budgets for an m x m mesh).
module mesh_ctrl
  import mesh_pkg::*;
#(
  parameter int unsigned QDEPTH = 4200,    // iterations per multiplication
  parameter int unsigned BUDGET = 2 * 975, // expected routing clocks
  parameter int unsigned NW     = 32,      // width of the multiplication counter
  parameter int unsigned SW     = 16       // width of the step counters
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_mult,
  input  logic          mesh_empty,
  input  logic          ip_done,
  output node_cmd_e     cmd,
  output phase_e        phase,
  output logic          ip_start,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] mult_done,   // multiplications finished in this run
  output logic [SW-1:0] route_steps, // clocks of the last routing operation
  output logic [SW-1:0] route_max,   // longest routing operation so far
  output logic          over_budget  // some routing operation exceeded BUDGET
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_LOAD, S_ROUTE, S_COMMIT, S_IP} state_e;

  localparam int unsigned IW = (QDEPTH <= 2) ? 1 : $clog2(QDEPTH);

  state_e        st;
  logic [IW-1:0] iter;
  logic [NW-1:0] left;
  logic [SW-1:0] steps;

  always_comb begin
    cmd      = NC_IDLE;
    ip_start = 1'b0;
    unique case (st)
      S_CLEAR:  cmd = NC_CLEAR;
      S_LOAD:   cmd = NC_LOAD;
      S_ROUTE:  cmd = mesh_empty ? NC_IDLE : NC_ROUTE;
      S_COMMIT: begin cmd = NC_COMMIT; ip_start = 1'b1; end
      default:  ;
    endcase
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      iter        <= '0;
      left        <= '0;
      steps       <= '0;
      phase       <= PH_UP;
      done        <= 1'b0;
      mult_done   <= '0;
      route_steps <= '0;
      route_max   <= '0;
      over_budget <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start && n_mult != '0) begin
          left      <= n_mult;
          mult_done <= '0;
          st        <= S_CLEAR;
        end
        S_CLEAR: begin
          iter <= '0;
          st   <= S_LOAD;
        end
        S_LOAD: begin
          steps <= '0;
          phase <= PH_UP;
          st    <= S_ROUTE;
        end
        S_ROUTE: begin
          if (mesh_empty) begin
            route_steps <= steps;
            if (steps > route_max) route_max <= steps;
            if (32'(steps) > BUDGET) over_budget <= 1'b1;
            if (32'(iter) == QDEPTH - 1) st <= S_COMMIT;
            else begin
              iter <= iter + 1'b1;
              st   <= S_LOAD;
            end
          end else begin
            steps <= (steps == '1) ? steps : steps + 1'b1;
            phase <= phase_e'(phase + 2'd1);
          end
        end
        S_COMMIT: st <= S_IP;
        S_IP: if (ip_done) begin
          mult_done <= mult_done + 1'b1;
          if (left == 1) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            left <= left - 1'b1;
            st   <= S_CLEAR;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A load is always followed by at least one non-load clock (entry RAM latency).
  a_no_back_to_back_load: assert property (@(posedge clk)
    (rst_n && cmd == NC_LOAD) |=> (cmd != NC_LOAD));

endmodule
