// scope_ctrl: control unit (finite state machine) of the SCoPE chain.
//
// One classification runs ceil(m/n) groups; each group makes every PE
// compute the dot product of the input vector with one of its SVs and then
// drains the n results through the kernel and the back-end MAC:
//   PROCESS  (n + k cycles): from its first cycle the front-end address
//            generators issue one element (and the matching SV address)
//            per cycle until the input vector address generator flags its
//            last element; the first is flagged acc_reset; the remaining
//            n cycles let the last element reach the back-end PE.
//   TRANSFER (n + 2 cycles): `xfer_load` (cycle 0) loads every PE's scalar
//            into its transfer register; during cycles 1..n the back-end PE
//            presents one scalar per cycle and `kern_en` / `alpha_en` are
//            high; the last two cycles flush the kernel and MAC stages.
// so a group takes exactly n + k + (n + 2) cycles and a vector
// (n + k + (n + 2)) * ceil(m/n), the published cycle count. After the last
// group (the SV address generator flagged its last address) one BIAS cycle
// adds b, and `done` pulses in the next cycle with the result settled.
// A start is accepted in IDLE only when the input vector memory reports a
// complete vector. The phase lengths follow the published description; the
// encoding and the handshake (start/busy/done) are this design's choices.
module scope_ctrl #(
  parameter int unsigned N   = 100,  // PEs
  parameter int unsigned K   = 400,  // elements per vector
  parameter int unsigned CW  = 16    // phase counter width
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic vec_ready,   // input vector memory holds a whole vector
  input  logic iv_last,     // IV address generator issued element k-1
  input  logic sv_last,     // SV address generator issued its last address
  output logic busy,
  output logic done,
  // front end
  output logic ag_clr,      // restart all address generators
  output logic elem_en,     // issue one element / SV address this cycle
  output logic acc_reset,   // the element issued is the first of a group
  // chain
  output logic xfer_load,   // PE multiplexer select
  output logic xfer_en,     // PEs in TRANSFERRING
  // back end
  output logic kern_en,     // back-end PE holds a scalar
  output logic alpha_en,    // read the next alpha coefficient
  output logic mac_clr,
  output logic bias_en,
  output logic in_group     // PROCESS or TRANSFER (for cycle counting)
);

  typedef enum logic [2:0] {
    S_IDLE, S_PROCESS, S_TRANSFER, S_BIAS, S_DONE
  } ctrl_state_e;

  ctrl_state_e   st;
  logic [CW-1:0] cnt;
  logic          last_group;
  logic          elems_done;  // all k elements of this group issued

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      cnt        <= '0;
      last_group <= 1'b0;
      elems_done <= 1'b0;
    end else begin
      case (st)
        S_IDLE: if (start && vec_ready) begin
          st         <= S_PROCESS;
          cnt        <= '0;
          last_group <= 1'b0;
          elems_done <= 1'b0;
        end
        S_PROCESS: begin
          if (elem_en && sv_last) last_group <= 1'b1;
          if (elem_en && iv_last) elems_done <= 1'b1;
          if (cnt == CW'(N + K - 1)) begin
            st  <= S_TRANSFER;
            cnt <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_TRANSFER: begin
          if (cnt == CW'(N + 1)) begin
            st         <= last_group ? S_BIAS : S_PROCESS;
            cnt        <= '0;
            elems_done <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_BIAS:  st <= S_DONE;
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (st != S_IDLE);
    done      = (st == S_DONE);
    ag_clr    = (st == S_IDLE) && start && vec_ready;
    mac_clr   = ag_clr;
    elem_en   = (st == S_PROCESS) && !elems_done;
    acc_reset = elem_en && (cnt == '0);
    xfer_en   = (st == S_TRANSFER);
    xfer_load = xfer_en && (cnt == '0);
    kern_en   = xfer_en && (cnt >= CW'(1)) && (cnt <= CW'(N));
    alpha_en  = kern_en;
    bias_en   = (st == S_BIAS);
    in_group  = (st == S_PROCESS) || (st == S_TRANSFER);
  end

  initial assert ((N + K + 2) < (1 << CW)) else $error("scope_ctrl: CW too small");

  // The element stream must end inside the processing phase.
  always_ff @(posedge clk) begin
    if (!rst && elem_en) assert (cnt < CW'(K)) else $error("scope_ctrl: more than K elements issued");
  end

endmodule
