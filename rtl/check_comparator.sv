// check_comparator: the comparison part of the controller image.
//
// It collects the active value (the device's DNA encrypted now) and the
// stored check value (read from the data segment), in either order, and once
// both are in it decides: the device is authenticated when they are equal.
// The decision is held until reset, so the protected design's enable cannot
// toggle.
//
// Interface: `active_valid` and `stored_valid` are one-clock strobes for
// their values. `decided` rises one clock after the second strobe, with
// `authenticated` valid from then on.
// The scheme asks for "a requested relation" between the two values; this
// implementation uses equality.
module check_comparator
  import auth_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   active_valid,
  input  check_t active_value,
  input  logic   stored_valid,
  input  check_t stored_value,
  output logic   decided,
  output logic   authenticated
);

  check_t a_q, s_q;
  logic   have_a, have_s;
  logic   have_a_n, have_s_n;
  check_t a_n, s_n;

  always_comb begin
    have_a_n = have_a || active_valid;
    have_s_n = have_s || stored_valid;
    a_n      = active_valid ? active_value : a_q;
    s_n      = stored_valid ? stored_value : s_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q           <= '0;
      s_q           <= '0;
      have_a        <= 1'b0;
      have_s        <= 1'b0;
      decided       <= 1'b0;
      authenticated <= 1'b0;
    end else if (!decided) begin
      a_q    <= a_n;
      s_q    <= s_n;
      have_a <= have_a_n;
      have_s <= have_s_n;
      if (have_a_n && have_s_n) begin
        decided       <= 1'b1;
        authenticated <= (a_n == s_n);
      end
    end
  end

  // Once decided, the verdict never changes.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             decided |=> (decided && $stable(authenticated)));

endmodule
