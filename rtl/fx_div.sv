// fx_div: sequential signed fixed-point divider, q = a / b.
//
// Both operands and the quotient are DW-bit two's-complement numbers with FW
// fraction bits. The divider works on magnitudes: the dividend |a| << FW is
// fed bit by bit into a restoring shift-subtract loop, one quotient bit per
// clock, and the sign is applied at the end. A quotient that does not fit in
// DW bits saturates; b = 0 raises dbz and returns the saturated value.
// The filter needs division only for reciprocals of pivots and determinants,
// which is why a slow, small divider is this design's choice.
//
// Timing: start is taken while idle (busy low). done pulses for one clock
// DW+FW+2 clocks after start, with q and dbz valid from then until the next
// start.
module fx_div #(
  parameter int unsigned DW = 48,
  parameter int unsigned FW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  output logic                 busy,
  output logic                 done,
  output logic signed [DW-1:0] q,
  output logic                 dbz
);
  localparam int unsigned NW = DW + FW;        // dividend / quotient bits
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] dividend;   // shifts out MSB first
  logic [NW-1:0] quot;
  logic [DW-1:0] rem;        // remainder, always below the divisor
  logic [DW-1:0] divisor;
  logic          neg;
  logic [CW-1:0] cnt;
  logic          run, fin;

  logic [DW:0]   rem_sh;
  logic [DW:0]   rem_sub;
  always_comb begin
    rem_sh  = {rem, dividend[NW-1]};
    rem_sub = rem_sh - {1'b0, divisor};
  end

  // operand magnitudes (the most negative value maps to 2^(DW-1))
  logic [DW-1:0] amag, bmag;
  assign amag = a[DW-1] ? DW'(-a) : DW'(a);
  assign bmag = b[DW-1] ? DW'(-b) : DW'(b);

  // magnitude of the final quotient, saturated to DW-1 bits
  logic [DW-1:0] mag;
  always_comb begin
    if (|quot[NW-1:DW-1]) mag = {1'b0, {(DW-1){1'b1}}};
    else                  mag = quot[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; fin <= 1'b0; done <= 1'b0; dbz <= 1'b0;
      q <= '0; dividend <= '0; quot <= '0; rem <= '0; divisor <= '0;
      neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run && !fin) begin
        dividend <= {amag, {FW{1'b0}}};
        divisor  <= bmag;
        neg      <= a[DW-1] ^ b[DW-1];
        dbz      <= (b == '0);
        quot     <= '0;
        rem      <= '0;
        cnt      <= CW'(NW);
        run      <= 1'b1;
      end else if (run) begin
        dividend <= dividend << 1;
        if (!rem_sub[DW]) begin
          rem  <= rem_sub[DW-1:0];
          quot <= {quot[NW-2:0], 1'b1};
        end else begin
          rem  <= rem_sh[DW-1:0];
          quot <= {quot[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
      end else if (fin) begin
        fin  <= 1'b0;
        done <= 1'b1;
        q    <= neg ? -$signed(mag) : $signed(mag);
      end
    end
  end

  assign busy = run | fin;
endmodule
