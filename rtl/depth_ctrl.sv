// depth_ctrl: fine-grain pipeline depth controller of the VSP processor.
//
// Two shift-register FIFOs of DEPTH one-bit entries record, for each of the
// last DEPTH processor cycles, whether an instruction retired (the IPC
// parameter) and whether that instruction was a branch. Running sums of the
// FIFOs (the "adder" of the block) are compared with three thresholds:
//   high-speed mode : request unification when ipc_sum <= th_htol
//   low-energy mode : request the deep pipeline again only when
//                     ipc_sum > th_ltoh and br_sum < th_br
// (the branch count keeps a branch-misprediction-heavy phase, whose IPC
// looks high once the shallow pipeline stops mispredicting, in low-energy
// mode). The FIFO, the adder/compare structure, the IPC parameter, the three
// thresholds, their Table-4.5 values and the software-writable thresholds
// follow the published design; the exact compare senses, the branch-count
// rule, the reset contents of the FIFOs and the threshold write port are
// this design's choices.
//
// When ctrl_en is low the controller is stopped and unify_req follows
// fixed_le, which selects a fixed high-speed or low-energy mode.
//
// Interface: sample_en marks one processor cycle (every clock in high-speed
// mode, every fourth clock in low-energy mode); retire/is_branch describe
// that cycle. Thresholds are written with th_we/th_sel/th_wdata
// (sel 0: IPC_HtoL, 1: IPC_LtoH, 2: #BR). unify_req is registered and
// changes one clock after the sample that causes it.
module depth_ctrl #(
  parameter int unsigned DEPTH       = 32,
  parameter int unsigned SW          = $clog2(DEPTH + 1),
  parameter logic [SW-1:0] TH_HTOL_RST = SW'(15),
  parameter logic [SW-1:0] TH_LTOH_RST = SW'(21),
  parameter logic [SW-1:0] TH_BR_RST   = SW'(6)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctrl_en,     // 0: controller stopped, mode from fixed_le
  input  logic          fixed_le,    // fixed mode when stopped: 1 = low-energy
  input  logic          le_mode,     // pipeline currently unified
  input  logic          sample_en,   // one processor cycle elapsed
  input  logic          retire,      // an instruction retired in that cycle
  input  logic          is_branch,   // ... and it was a branch or jump
  input  logic          th_we,
  input  logic [1:0]    th_sel,
  input  logic [SW-1:0] th_wdata,
  output logic          unify_req,   // 1: low-energy (unified) pipeline wanted
  output logic [SW-1:0] ipc_sum,
  output logic [SW-1:0] br_sum,
  output logic [SW-1:0] th_htol,
  output logic [SW-1:0] th_ltoh,
  output logic [SW-1:0] th_br
);

  logic [DEPTH-1:0] ipc_fifo, br_fifo;
  logic             run;
  logic             want_le;

  assign run = ctrl_en && sample_en;

  // FIFO of per-cycle flags; the sums add the new entry and drop the oldest.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ipc_fifo <= '1;                 // start as if the pipeline were busy
      br_fifo  <= '0;
      ipc_sum  <= SW'(DEPTH);
      br_sum   <= '0;
    end else if (run) begin
      ipc_fifo <= {ipc_fifo[DEPTH-2:0], retire};
      br_fifo  <= {br_fifo[DEPTH-2:0], retire && is_branch};
      ipc_sum  <= ipc_sum + SW'(retire) - SW'(ipc_fifo[DEPTH-1]);
      br_sum   <= br_sum + SW'(retire && is_branch) - SW'(br_fifo[DEPTH-1]);
    end
  end

  // Software-set thresholds (co-processor registers).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_htol <= TH_HTOL_RST;
      th_ltoh <= TH_LTOH_RST;
      th_br   <= TH_BR_RST;
    end else if (th_we) begin
      unique case (th_sel)
        2'd0:    th_htol <= th_wdata;
        2'd1:    th_ltoh <= th_wdata;
        default: th_br   <= th_wdata;
      endcase
    end
  end

  // Comparators.
  always_comb begin
    if (!le_mode) want_le = (ipc_sum <= th_htol);
    else          want_le = !((ipc_sum > th_ltoh) && (br_sum < th_br));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        unify_req <= 1'b0;
    else if (!ctrl_en) unify_req <= fixed_le;
    else               unify_req <= want_le;
  end

endmodule
