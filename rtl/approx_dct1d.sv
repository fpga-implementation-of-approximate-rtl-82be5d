// approx_dct1d - selects one of the seven 8-point approximate DCT cores.
//
// A thin wrapper so that the 2D engine can name its row and column transform
// with one KIND parameter. It instantiates exactly one core, passes the
// vector through it and adds nothing: latency and output width are those of
// the chosen core (approx_dct_pkg::latency and ::growth). OUT_W must be
// IN_W + growth(KIND). A_MODE is used by the BAS-2011 core only. Choosing
// the core by parameter is a choice of this design.
module approx_dct1d
  import approx_dct_pkg::*;
#(
  parameter dct_kind_e KIND   = VAITHY2014,
  parameter int        IN_W   = 8,
  parameter int        OUT_W  = IN_W + int'(growth(KIND)),
  parameter bas_a_e    A_MODE = A_HALF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y [8]
);

  generate
    case (KIND)
      BAS2008: begin : g_core
        bas2008_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
      BAS2011: begin : g_core
        bas2011_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W), .A_MODE(A_MODE)) u_core (.*);
      end
      CB2011: begin : g_core
        cb2011_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
      MCB2011: begin : g_core
        mcb2011_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
      POTLURI2012: begin : g_core
        potluri2012_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
      POTLURI2014: begin : g_core
        potluri2014_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
      default: begin : g_core
        vaithy2014_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) u_core (.*);
      end
    endcase
  endgenerate

endmodule
