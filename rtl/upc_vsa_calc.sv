// upc_vsa_calc: one step of the Virtual Scheduling Algorithm for one cell.
//
// The three tests of the VSA are evaluated at the same time and a priority
// encoder picks the first that holds, instead of testing them one after the
// other (this parallel evaluation is the document's idea for a short decision
// time):
//   1. LATE : the stored TAT is expired (E bit) or earlier than the arrival
//             time t -> conforming, new TAT = t + T
//   2. NC   : TAT is later than t + tau -> non-conforming, TAT unchanged
//   3. EARLY: otherwise -> conforming, new TAT = TAT + T
// t and TAT wrap at 2**TAT_W, so "earlier/later" are taken from the signed
// modular difference; the expiry processor guarantees that a live TAT is never
// further than 2**(TAT_W-1) from t. T (T_W bits) and TAT share the same 8-bit
// fraction; tau is taken as whole cell slots and aligned by TAU_SHIFT.
//
// Purely combinational.
module upc_vsa_calc
  import atm_pkg::*;
#(
  parameter int unsigned TAU_SHIFT = 8
) (
  input  logic [TAT_W-1:0]  tat,
  input  logic [T_W-1:0]    t_inc,
  input  logic [TAU_W-1:0]  tau,
  input  logic              expired,
  input  logic [TIME_W-1:0] t_now,
  output vsa_dec_t          dec,
  output logic              conform,
  output logic [TAT_W-1:0]  tat_new
);
  logic signed [TAT_W-1:0] t_minus_tat;   // > 0 : TAT lies in the past
  logic signed [TAT_W-1:0] tat_minus_t;   // how far TAT lies ahead of t
  logic        [TAT_W-1:0] tau_al;
  logic                    c_late, c_nc;

  always_comb begin
    t_minus_tat = $signed(t_now - tat);
    tat_minus_t = $signed(tat - t_now);
    tau_al      = TAT_W'(tau) << TAU_SHIFT;
    // the decision parts, evaluated side by side
    c_late = expired || (t_minus_tat > 0);
    c_nc   = tat_minus_t > $signed(tau_al);
    // priority encoder
    if (c_late) begin
      dec     = VSA_LATE;
      tat_new = t_now + TAT_W'(t_inc);
    end else if (c_nc) begin
      dec     = VSA_NC;
      tat_new = tat;
    end else begin
      dec     = VSA_EARLY;
      tat_new = tat + TAT_W'(t_inc);
    end
    conform = (dec != VSA_NC);
  end
endmodule
