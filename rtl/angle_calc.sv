// angle_calc: look-up-table post-processing from phase and period to angle.
//
// For each axis the mirror angle at the sample instant is computed as
//     angle = k0 * sin(2*pi * phi / T)
// where phi is the time since the axis' last sense rising edge, T its last
// period and k0 a calibration gain (the maximum deflection in the caller's
// angle unit). phi/T is formed as a PB-bit fraction of a turn by a restoring
// divider (one quotient bit per cycle, phi >= T is clamped to the last step);
// the sine comes from a quarter-wave table of 2^(PB-2) entries, each
// round((2^SW-1) * sin(2*pi*(i+0.5)/2^PB)), filled at elaboration from a Taylor
// series; the product is scaled back by 2^SW.
//
// Interface and timing: a record is accepted on in_valid when idle (busy low);
// a record arriving while busy is dropped and counted in 'dropped'. out_valid
// pulses 2*(PB+3)+1 cycles after in_valid with both signed angles (PB cycles
// fewer for each axis whose phase is clamped or whose period is zero). The formula
// follows the design description; the table size, word widths, half-step table
// offset and sequential divider are this design's choices.
module angle_calc
  import moems_pkg::*;
#(
  parameter int unsigned MW = moems_pkg::MEAS_W,
  parameter int unsigned PB = 12,    // phase bits per turn
  parameter int unsigned SW = 15,    // sine magnitude bits
  parameter int unsigned KW = 15     // calibration gain bits (unsigned)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [MW-1:0]       t1,
  input  logic [MW-1:0]       phi1,
  input  logic [MW-1:0]       t2,
  input  logic [MW-1:0]       phi2,
  input  logic [KW-1:0]       k0_1,
  input  logic [KW-1:0]       k0_2,
  output logic                busy,
  output logic                out_valid,
  output logic signed [KW:0]  angle1,
  output logic signed [KW:0]  angle2,
  output logic [15:0]         dropped
);

  localparam int unsigned QN = 2 ** (PB - 2);
  typedef logic [SW-1:0] lut_t [QN];

  function automatic lut_t gen_lut();
    lut_t t;
    real  x, term, s;
    for (int i = 0; i < QN; i++) begin
      x    = 2.0 * 3.14159265358979323846 * (real'(i) + 0.5) / real'(4 * QN);
      s    = x;
      term = x;
      for (int n = 1; n < 10; n++) begin
        term = -term * x * x / real'((2 * n) * (2 * n + 1));
        s    = s + term;
      end
      t[i] = SW'($rtoi(s * real'(2 ** SW - 1) + 0.5));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = gen_lut();

  typedef enum logic [2:0] {A_IDLE, A_DIV, A_LUT, A_MUL, A_NEXT} a_state_e;
  a_state_e st;

  logic [MW-1:0]  r_t [2];
  logic [MW-1:0]  r_phi [2];
  logic [KW-1:0]  r_k [2];
  logic           ax;
  logic [MW-1:0]  rem;
  logic [PB-1:0]  q;
  logic [$clog2(PB+1)-1:0] bitn;
  logic [SW-1:0]  sinv;
  logic           neg;
  logic [MW:0]    rem2;

  assign rem2 = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; ax <= 1'b0; rem <= '0; q <= '0; bitn <= '0; sinv <= '0; neg <= 1'b0;
      out_valid <= 1'b0; angle1 <= '0; angle2 <= '0; dropped <= '0;
      for (int i = 0; i < 2; i++) begin r_t[i] <= '0; r_phi[i] <= '0; r_k[i] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (in_valid && st != A_IDLE && dropped != 16'hFFFF) dropped <= dropped + 16'd1;
      unique case (st)
        A_IDLE: if (in_valid) begin
          r_t[0] <= t1; r_phi[0] <= phi1; r_k[0] <= k0_1;
          r_t[1] <= t2; r_phi[1] <= phi2; r_k[1] <= k0_2;
          ax  <= 1'b0;
          st  <= A_NEXT;
        end
        A_NEXT: begin
          // Start one axis: clamp phi below T.
          if (r_t[ax] == '0 || r_phi[ax] >= r_t[ax]) begin
            rem  <= '0;
            q    <= (r_t[ax] == '0) ? '0 : '1;
            bitn <= '0;
            st   <= A_LUT;
          end else begin
            rem  <= r_phi[ax];
            q    <= '0;
            bitn <= ($clog2(PB+1))'(PB);
            st   <= A_DIV;
          end
        end
        A_DIV: begin
          if (rem2 >= {1'b0, r_t[ax]}) begin
            rem <= MW'(rem2 - {1'b0, r_t[ax]});
            q   <= {q[PB-2:0], 1'b1};
          end else begin
            rem <= rem2[MW-1:0];
            q   <= {q[PB-2:0], 1'b0};
          end
          bitn <= bitn - 1'b1;
          if (bitn == 1) st <= A_LUT;
        end
        A_LUT: begin
          neg  <= q[PB-1];
          sinv <= q[PB-2] ? SIN_LUT[QN - 1 - int'(q[PB-3:0])] : SIN_LUT[q[PB-3:0]];
          st   <= A_MUL;
        end
        A_MUL: begin
          if (!ax) angle1 <= scale(sinv, r_k[0], neg);
          else     angle2 <= scale(sinv, r_k[1], neg);
          if (ax) begin
            out_valid <= 1'b1;
            st        <= A_IDLE;
          end else begin
            ax <= 1'b1;
            st <= A_NEXT;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  function automatic logic signed [KW:0] scale(input logic [SW-1:0] s, input logic [KW-1:0] k,
                                               input logic ng);
    logic [SW+KW-1:0] p;
    logic [KW:0]      m;
    p = s * k;
    m = {1'b0, KW'(p >> SW)};
    return ng ? -$signed(m) : $signed(m);
  endfunction

  assign busy = (st != A_IDLE);

endmodule
