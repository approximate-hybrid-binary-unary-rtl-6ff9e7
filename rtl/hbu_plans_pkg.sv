// hbu_plans_pkg: the function division of every HBU unit in this design.
//
// Each constant is the outcome of dividing one function into sub-functions
// (regions) whose upper K output bits are constant, followed by sharing of
// near-identical truncated sub-functions between unary cores. The division
// works on the rounded integer codes f(x) of hbu_pkg::f_eval:
//   1. cut [0, 2^W) into aligned regions of 2^IL inputs;
//   2. take a region; if the upper K bits of f are equal over it, keep it;
//      otherwise, for each candidate upper-bit value ub, clip f to
//      [ub*2^(W-K), (ub+1)*2^(W-K)-1] and take the ub with the smallest
//      rounding error  mean|f_clipped - f| / 2^W;
//      keep the region with that ub if the error is below TRE or the region
//      has reached 2^Lmin inputs, otherwise halve it and repeat on both halves;
//   3. in region order, give a region the core of an earlier region of the
//      same length whose truncated outputs g differ from its own by at most
//      TSE (mean|g_i - g_j| / 2^W), else a new core.
// Config. 1 plans were chosen for a mean absolute error below 0.01 and
// Config. 2 plans below 0.001, at the lowest estimated core cost. The
// parameters and the resulting error of each are given above it.
//
// Source: the division and sharing steps follow the paper's algorithm; the
// parameter values of each plan are this design's own, found by search.
package hbu_plans_pkg;
  import hbu_pkg::*;

  // cosh at 16 bits, Config. 2: IL=8 Lmin=8 K=10 TRE=0.0006 TSE=0.0003; 256 sub-functions on 4 unary cores, mean absolute error 0.000386
  localparam hbu_plan_t COSH16_C2 = '{
    func: F_COSH, w: 16, k: 10, nreg: 256, ncore: 4,
    reg_start: {16'd65280, 16'd65024, 16'd64768, 16'd64512, 16'd64256, 16'd64000, 16'd63744, 16'd63488, 16'd63232, 16'd62976, 16'd62720, 16'd62464, 16'd62208, 16'd61952, 16'd61696, 16'd61440, 16'd61184, 16'd60928, 16'd60672, 16'd60416, 16'd60160, 16'd59904, 16'd59648, 16'd59392, 16'd59136, 16'd58880, 16'd58624, 16'd58368, 16'd58112, 16'd57856, 16'd57600, 16'd57344, 16'd57088, 16'd56832, 16'd56576, 16'd56320, 16'd56064, 16'd55808, 16'd55552, 16'd55296, 16'd55040, 16'd54784, 16'd54528, 16'd54272, 16'd54016, 16'd53760, 16'd53504, 16'd53248, 16'd52992, 16'd52736, 16'd52480, 16'd52224, 16'd51968, 16'd51712, 16'd51456, 16'd51200, 16'd50944, 16'd50688, 16'd50432, 16'd50176, 16'd49920, 16'd49664, 16'd49408, 16'd49152, 16'd48896, 16'd48640, 16'd48384, 16'd48128, 16'd47872, 16'd47616, 16'd47360, 16'd47104, 16'd46848, 16'd46592, 16'd46336, 16'd46080, 16'd45824, 16'd45568, 16'd45312, 16'd45056, 16'd44800, 16'd44544, 16'd44288, 16'd44032, 16'd43776, 16'd43520, 16'd43264, 16'd43008, 16'd42752, 16'd42496, 16'd42240, 16'd41984, 16'd41728, 16'd41472, 16'd41216, 16'd40960, 16'd40704, 16'd40448, 16'd40192, 16'd39936, 16'd39680, 16'd39424, 16'd39168, 16'd38912, 16'd38656, 16'd38400, 16'd38144, 16'd37888, 16'd37632, 16'd37376, 16'd37120, 16'd36864, 16'd36608, 16'd36352, 16'd36096, 16'd35840, 16'd35584, 16'd35328, 16'd35072, 16'd34816, 16'd34560, 16'd34304, 16'd34048, 16'd33792, 16'd33536, 16'd33280, 16'd33024, 16'd32768, 16'd32512, 16'd32256, 16'd32000, 16'd31744, 16'd31488, 16'd31232, 16'd30976, 16'd30720, 16'd30464, 16'd30208, 16'd29952, 16'd29696, 16'd29440, 16'd29184, 16'd28928, 16'd28672, 16'd28416, 16'd28160, 16'd27904, 16'd27648, 16'd27392, 16'd27136, 16'd26880, 16'd26624, 16'd26368, 16'd26112, 16'd25856, 16'd25600, 16'd25344, 16'd25088, 16'd24832, 16'd24576, 16'd24320, 16'd24064, 16'd23808, 16'd23552, 16'd23296, 16'd23040, 16'd22784, 16'd22528, 16'd22272, 16'd22016, 16'd21760, 16'd21504, 16'd21248, 16'd20992, 16'd20736, 16'd20480, 16'd20224, 16'd19968, 16'd19712, 16'd19456, 16'd19200, 16'd18944, 16'd18688, 16'd18432, 16'd18176, 16'd17920, 16'd17664, 16'd17408, 16'd17152, 16'd16896, 16'd16640, 16'd16384, 16'd16128, 16'd15872, 16'd15616, 16'd15360, 16'd15104, 16'd14848, 16'd14592, 16'd14336, 16'd14080, 16'd13824, 16'd13568, 16'd13312, 16'd13056, 16'd12800, 16'd12544, 16'd12288, 16'd12032, 16'd11776, 16'd11520, 16'd11264, 16'd11008, 16'd10752, 16'd10496, 16'd10240, 16'd9984, 16'd9728, 16'd9472, 16'd9216, 16'd8960, 16'd8704, 16'd8448, 16'd8192, 16'd7936, 16'd7680, 16'd7424, 16'd7168, 16'd6912, 16'd6656, 16'd6400, 16'd6144, 16'd5888, 16'd5632, 16'd5376, 16'd5120, 16'd4864, 16'd4608, 16'd4352, 16'd4096, 16'd3840, 16'd3584, 16'd3328, 16'd3072, 16'd2816, 16'd2560, 16'd2304, 16'd2048, 16'd1792, 16'd1536, 16'd1280, 16'd1024, 16'd768, 16'd512, 16'd256, 16'd0},
    reg_len: {5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8},
    reg_ub: {16'd553, 16'd549, 16'd544, 16'd539, 16'd535, 16'd530, 16'd526, 16'd521, 16'd517, 16'd512, 16'd508, 16'd503, 16'd499, 16'd494, 16'd490, 16'd486, 16'd481, 16'd477, 16'd473, 16'd468, 16'd464, 16'd460, 16'd456, 16'd452, 16'd448, 16'd443, 16'd439, 16'd435, 16'd431, 16'd427, 16'd423, 16'd419, 16'd415, 16'd411, 16'd407, 16'd403, 16'd400, 16'd396, 16'd392, 16'd388, 16'd384, 16'd380, 16'd377, 16'd373, 16'd369, 16'd366, 16'd362, 16'd358, 16'd355, 16'd351, 16'd348, 16'd344, 16'd340, 16'd337, 16'd333, 16'd330, 16'd326, 16'd323, 16'd320, 16'd316, 16'd313, 16'd310, 16'd306, 16'd303, 16'd300, 16'd296, 16'd293, 16'd290, 16'd287, 16'd283, 16'd280, 16'd277, 16'd274, 16'd271, 16'd268, 16'd265, 16'd262, 16'd259, 16'd256, 16'd253, 16'd250, 16'd247, 16'd244, 16'd241, 16'd238, 16'd235, 16'd232, 16'd229, 16'd227, 16'd224, 16'd221, 16'd218, 16'd216, 16'd213, 16'd210, 16'd207, 16'd205, 16'd202, 16'd199, 16'd197, 16'd194, 16'd192, 16'd189, 16'd187, 16'd184, 16'd182, 16'd179, 16'd177, 16'd174, 16'd172, 16'd169, 16'd167, 16'd165, 16'd162, 16'd160, 16'd158, 16'd155, 16'd153, 16'd151, 16'd149, 16'd146, 16'd144, 16'd142, 16'd140, 16'd138, 16'd135, 16'd133, 16'd131, 16'd129, 16'd127, 16'd125, 16'd123, 16'd121, 16'd119, 16'd117, 16'd115, 16'd113, 16'd111, 16'd109, 16'd107, 16'd106, 16'd104, 16'd102, 16'd100, 16'd98, 16'd96, 16'd95, 16'd93, 16'd91, 16'd89, 16'd88, 16'd86, 16'd84, 16'd83, 16'd81, 16'd79, 16'd78, 16'd76, 16'd75, 16'd73, 16'd72, 16'd70, 16'd69, 16'd67, 16'd66, 16'd64, 16'd63, 16'd61, 16'd60, 16'd59, 16'd57, 16'd56, 16'd54, 16'd53, 16'd52, 16'd51, 16'd49, 16'd48, 16'd47, 16'd46, 16'd44, 16'd43, 16'd42, 16'd41, 16'd40, 16'd39, 16'd37, 16'd36, 16'd35, 16'd34, 16'd33, 16'd32, 16'd31, 16'd30, 16'd29, 16'd28, 16'd27, 16'd26, 16'd25, 16'd25, 16'd24, 16'd23, 16'd22, 16'd21, 16'd20, 16'd19, 16'd19, 16'd18, 16'd17, 16'd16, 16'd16, 16'd15, 16'd14, 16'd14, 16'd13, 16'd12, 16'd12, 16'd11, 16'd11, 16'd10, 16'd9, 16'd9, 16'd8, 16'd8, 16'd7, 16'd7, 16'd6, 16'd6, 16'd5, 16'd5, 16'd5, 16'd4, 16'd4, 16'd3, 16'd3, 16'd3, 16'd2, 16'd2, 16'd2, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0},
    reg_core: {4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd3, 4'd3, 4'd0, 4'd2, 4'd3, 4'd3, 4'd3, 4'd1, 4'd2, 4'd2, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd2, 4'd0, 4'd0, 4'd3, 4'd3, 4'd2, 4'd2, 4'd0, 4'd3, 4'd3, 4'd2, 4'd1, 4'd3, 4'd2, 4'd0, 4'd3, 4'd2, 4'd1, 4'd2, 4'd0, 4'd2, 4'd0, 4'd2, 4'd0, 4'd2, 4'd0, 4'd2, 4'd0, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd2, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd1, 4'd0, 4'd2, 4'd2, 4'd1, 4'd1, 4'd0, 4'd0, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd0, 4'd0, 4'd0, 4'd1, 4'd1, 4'd2, 4'd2, 4'd0, 4'd1, 4'd2, 4'd2, 4'd0, 4'd1, 4'd2, 4'd0, 4'd1, 4'd2, 4'd0, 4'd1, 4'd0, 4'd1, 4'd2, 4'd1, 4'd2, 4'd0, 4'd2, 4'd0, 4'd2, 4'd1, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd2, 4'd1, 4'd0, 4'd2, 4'd2, 4'd1, 4'd0, 4'd2, 4'd2, 4'd1, 4'd0, 4'd0, 4'd2, 4'd2, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{12{8'd0}}, 8'd101, 8'd9, 8'd6, 8'd0}
  };

  // cosh at 16 bits, Config. 1: IL=10 Lmin=7 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00209
  localparam hbu_plan_t COSH16_C1 = '{
    func: F_COSH, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd4374, 16'd4226, 16'd4082, 16'd3941, 16'd3802, 16'd3667, 16'd3534, 16'd3404, 16'd3278, 16'd3154, 16'd3032, 16'd2914, 16'd2798, 16'd2685, 16'd2574, 16'd2466, 16'd2361, 16'd2259, 16'd2158, 16'd2061, 16'd1966, 16'd1873, 16'd1783, 16'd1695, 16'd1610, 16'd1527, 16'd1446, 16'd1368, 16'd1292, 16'd1219, 16'd1148, 16'd1079, 16'd1012, 16'd947, 16'd885, 16'd825, 16'd767, 16'd712, 16'd658, 16'd607, 16'd558, 16'd511, 16'd466, 16'd423, 16'd383, 16'd344, 16'd308, 16'd273, 16'd241, 16'd211, 16'd182, 16'd156, 16'd132, 16'd110, 16'd90, 16'd72, 16'd56, 16'd42, 16'd30, 16'd20, 16'd12, 16'd6, 16'd2, 16'd0},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // exp at 16 bits, Config. 2: IL=9 Lmin=9 K=10 TRE=0.0006 TSE=0.0003; 128 sub-functions on 1 unary cores, mean absolute error 0.000922
  localparam hbu_plan_t EXP16_C2 = '{
    func: F_EXP, w: 16, k: 10, nreg: 128, ncore: 1,
    reg_start: {{128{16'd0}}, 16'd65024, 16'd64512, 16'd64000, 16'd63488, 16'd62976, 16'd62464, 16'd61952, 16'd61440, 16'd60928, 16'd60416, 16'd59904, 16'd59392, 16'd58880, 16'd58368, 16'd57856, 16'd57344, 16'd56832, 16'd56320, 16'd55808, 16'd55296, 16'd54784, 16'd54272, 16'd53760, 16'd53248, 16'd52736, 16'd52224, 16'd51712, 16'd51200, 16'd50688, 16'd50176, 16'd49664, 16'd49152, 16'd48640, 16'd48128, 16'd47616, 16'd47104, 16'd46592, 16'd46080, 16'd45568, 16'd45056, 16'd44544, 16'd44032, 16'd43520, 16'd43008, 16'd42496, 16'd41984, 16'd41472, 16'd40960, 16'd40448, 16'd39936, 16'd39424, 16'd38912, 16'd38400, 16'd37888, 16'd37376, 16'd36864, 16'd36352, 16'd35840, 16'd35328, 16'd34816, 16'd34304, 16'd33792, 16'd33280, 16'd32768, 16'd32256, 16'd31744, 16'd31232, 16'd30720, 16'd30208, 16'd29696, 16'd29184, 16'd28672, 16'd28160, 16'd27648, 16'd27136, 16'd26624, 16'd26112, 16'd25600, 16'd25088, 16'd24576, 16'd24064, 16'd23552, 16'd23040, 16'd22528, 16'd22016, 16'd21504, 16'd20992, 16'd20480, 16'd19968, 16'd19456, 16'd18944, 16'd18432, 16'd17920, 16'd17408, 16'd16896, 16'd16384, 16'd15872, 16'd15360, 16'd14848, 16'd14336, 16'd13824, 16'd13312, 16'd12800, 16'd12288, 16'd11776, 16'd11264, 16'd10752, 16'd10240, 16'd9728, 16'd9216, 16'd8704, 16'd8192, 16'd7680, 16'd7168, 16'd6656, 16'd6144, 16'd5632, 16'd5120, 16'd4608, 16'd4096, 16'd3584, 16'd3072, 16'd2560, 16'd2048, 16'd1536, 16'd1024, 16'd512, 16'd0},
    reg_len: {{128{5'd0}}, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9, 5'd9},
    reg_ub: {{128{16'd0}}, 16'd1020, 16'd1012, 16'd1004, 16'd996, 16'd988, 16'd980, 16'd973, 16'd965, 16'd958, 16'd950, 16'd943, 16'd936, 16'd928, 16'd921, 16'd914, 16'd907, 16'd900, 16'd893, 16'd886, 16'd879, 16'd872, 16'd865, 16'd858, 16'd852, 16'd845, 16'd839, 16'd832, 16'd826, 16'd819, 16'd813, 16'd806, 16'd800, 16'd794, 16'd788, 16'd782, 16'd775, 16'd769, 16'd763, 16'd758, 16'd752, 16'd746, 16'd740, 16'd734, 16'd728, 16'd723, 16'd717, 16'd712, 16'd706, 16'd701, 16'd695, 16'd690, 16'd684, 16'd679, 16'd674, 16'd668, 16'd663, 16'd658, 16'd653, 16'd648, 16'd643, 16'd638, 16'd633, 16'd628, 16'd623, 16'd618, 16'd613, 16'd609, 16'd604, 16'd599, 16'd594, 16'd590, 16'd585, 16'd581, 16'd576, 16'd572, 16'd567, 16'd563, 16'd558, 16'd554, 16'd550, 16'd545, 16'd541, 16'd537, 16'd533, 16'd529, 16'd525, 16'd520, 16'd516, 16'd512, 16'd508, 16'd504, 16'd501, 16'd497, 16'd493, 16'd489, 16'd485, 16'd481, 16'd478, 16'd474, 16'd470, 16'd466, 16'd463, 16'd459, 16'd456, 16'd452, 16'd449, 16'd445, 16'd442, 16'd438, 16'd435, 16'd431, 16'd428, 16'd425, 16'd421, 16'd418, 16'd415, 16'd412, 16'd408, 16'd405, 16'd402, 16'd399, 16'd396, 16'd393, 16'd390, 16'd387, 16'd384, 16'd381, 16'd378},
    reg_core: {{128{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // exp at 16 bits, Config. 1: IL=10 Lmin=7 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00242
  localparam hbu_plan_t EXP16_C1 = '{
    func: F_EXP, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd8128, 16'd8002, 16'd7878, 16'd7756, 16'd7635, 16'd7517, 16'd7400, 16'd7286, 16'd7173, 16'd7061, 16'd6952, 16'd6844, 16'd6738, 16'd6634, 16'd6531, 16'd6429, 16'd6330, 16'd6232, 16'd6135, 16'd6040, 16'd5946, 16'd5854, 16'd5763, 16'd5674, 16'd5586, 16'd5499, 16'd5414, 16'd5330, 16'd5248, 16'd5166, 16'd5086, 16'd5007, 16'd4930, 16'd4853, 16'd4778, 16'd4704, 16'd4631, 16'd4559, 16'd4488, 16'd4419, 16'd4350, 16'd4283, 16'd4216, 16'd4151, 16'd4087, 16'd4023, 16'd3961, 16'd3900, 16'd3839, 16'd3780, 16'd3721, 16'd3663, 16'd3606, 16'd3551, 16'd3495, 16'd3441, 16'd3388, 16'd3335, 16'd3284, 16'd3233, 16'd3183, 16'd3133, 16'd3085, 16'd3037},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // gamma at 16 bits, Config. 2: IL=8 Lmin=8 K=10 TRE=0.0006 TSE=0.0003; 256 sub-functions on 1 unary cores, mean absolute error 0.000697
  localparam hbu_plan_t GAMMA16_C2 = '{
    func: F_GAMMA, w: 16, k: 10, nreg: 256, ncore: 1,
    reg_start: {16'd65280, 16'd65024, 16'd64768, 16'd64512, 16'd64256, 16'd64000, 16'd63744, 16'd63488, 16'd63232, 16'd62976, 16'd62720, 16'd62464, 16'd62208, 16'd61952, 16'd61696, 16'd61440, 16'd61184, 16'd60928, 16'd60672, 16'd60416, 16'd60160, 16'd59904, 16'd59648, 16'd59392, 16'd59136, 16'd58880, 16'd58624, 16'd58368, 16'd58112, 16'd57856, 16'd57600, 16'd57344, 16'd57088, 16'd56832, 16'd56576, 16'd56320, 16'd56064, 16'd55808, 16'd55552, 16'd55296, 16'd55040, 16'd54784, 16'd54528, 16'd54272, 16'd54016, 16'd53760, 16'd53504, 16'd53248, 16'd52992, 16'd52736, 16'd52480, 16'd52224, 16'd51968, 16'd51712, 16'd51456, 16'd51200, 16'd50944, 16'd50688, 16'd50432, 16'd50176, 16'd49920, 16'd49664, 16'd49408, 16'd49152, 16'd48896, 16'd48640, 16'd48384, 16'd48128, 16'd47872, 16'd47616, 16'd47360, 16'd47104, 16'd46848, 16'd46592, 16'd46336, 16'd46080, 16'd45824, 16'd45568, 16'd45312, 16'd45056, 16'd44800, 16'd44544, 16'd44288, 16'd44032, 16'd43776, 16'd43520, 16'd43264, 16'd43008, 16'd42752, 16'd42496, 16'd42240, 16'd41984, 16'd41728, 16'd41472, 16'd41216, 16'd40960, 16'd40704, 16'd40448, 16'd40192, 16'd39936, 16'd39680, 16'd39424, 16'd39168, 16'd38912, 16'd38656, 16'd38400, 16'd38144, 16'd37888, 16'd37632, 16'd37376, 16'd37120, 16'd36864, 16'd36608, 16'd36352, 16'd36096, 16'd35840, 16'd35584, 16'd35328, 16'd35072, 16'd34816, 16'd34560, 16'd34304, 16'd34048, 16'd33792, 16'd33536, 16'd33280, 16'd33024, 16'd32768, 16'd32512, 16'd32256, 16'd32000, 16'd31744, 16'd31488, 16'd31232, 16'd30976, 16'd30720, 16'd30464, 16'd30208, 16'd29952, 16'd29696, 16'd29440, 16'd29184, 16'd28928, 16'd28672, 16'd28416, 16'd28160, 16'd27904, 16'd27648, 16'd27392, 16'd27136, 16'd26880, 16'd26624, 16'd26368, 16'd26112, 16'd25856, 16'd25600, 16'd25344, 16'd25088, 16'd24832, 16'd24576, 16'd24320, 16'd24064, 16'd23808, 16'd23552, 16'd23296, 16'd23040, 16'd22784, 16'd22528, 16'd22272, 16'd22016, 16'd21760, 16'd21504, 16'd21248, 16'd20992, 16'd20736, 16'd20480, 16'd20224, 16'd19968, 16'd19712, 16'd19456, 16'd19200, 16'd18944, 16'd18688, 16'd18432, 16'd18176, 16'd17920, 16'd17664, 16'd17408, 16'd17152, 16'd16896, 16'd16640, 16'd16384, 16'd16128, 16'd15872, 16'd15616, 16'd15360, 16'd15104, 16'd14848, 16'd14592, 16'd14336, 16'd14080, 16'd13824, 16'd13568, 16'd13312, 16'd13056, 16'd12800, 16'd12544, 16'd12288, 16'd12032, 16'd11776, 16'd11520, 16'd11264, 16'd11008, 16'd10752, 16'd10496, 16'd10240, 16'd9984, 16'd9728, 16'd9472, 16'd9216, 16'd8960, 16'd8704, 16'd8448, 16'd8192, 16'd7936, 16'd7680, 16'd7424, 16'd7168, 16'd6912, 16'd6656, 16'd6400, 16'd6144, 16'd5888, 16'd5632, 16'd5376, 16'd5120, 16'd4864, 16'd4608, 16'd4352, 16'd4096, 16'd3840, 16'd3584, 16'd3328, 16'd3072, 16'd2816, 16'd2560, 16'd2304, 16'd2048, 16'd1792, 16'd1536, 16'd1280, 16'd1024, 16'd768, 16'd512, 16'd256, 16'd0},
    reg_len: {5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8},
    reg_ub: {16'd1023, 16'd1021, 16'd1019, 16'd1017, 16'd1015, 16'd1014, 16'd1012, 16'd1010, 16'd1008, 16'd1006, 16'd1004, 16'd1003, 16'd1001, 16'd999, 16'd997, 16'd995, 16'd993, 16'd991, 16'd990, 16'd988, 16'd986, 16'd984, 16'd982, 16'd980, 16'd978, 16'd976, 16'd974, 16'd972, 16'd971, 16'd969, 16'd967, 16'd965, 16'd963, 16'd961, 16'd959, 16'd957, 16'd955, 16'd953, 16'd951, 16'd949, 16'd947, 16'd945, 16'd943, 16'd941, 16'd939, 16'd937, 16'd935, 16'd933, 16'd931, 16'd929, 16'd927, 16'd925, 16'd923, 16'd921, 16'd919, 16'd917, 16'd915, 16'd913, 16'd911, 16'd909, 16'd907, 16'd904, 16'd902, 16'd900, 16'd898, 16'd896, 16'd894, 16'd892, 16'd890, 16'd887, 16'd885, 16'd883, 16'd881, 16'd879, 16'd877, 16'd875, 16'd872, 16'd870, 16'd868, 16'd866, 16'd864, 16'd861, 16'd859, 16'd857, 16'd855, 16'd852, 16'd850, 16'd848, 16'd846, 16'd843, 16'd841, 16'd839, 16'd836, 16'd834, 16'd832, 16'd829, 16'd827, 16'd825, 16'd822, 16'd820, 16'd818, 16'd815, 16'd813, 16'd811, 16'd808, 16'd806, 16'd803, 16'd801, 16'd799, 16'd796, 16'd794, 16'd791, 16'd789, 16'd786, 16'd784, 16'd781, 16'd779, 16'd776, 16'd774, 16'd771, 16'd769, 16'd766, 16'd763, 16'd761, 16'd758, 16'd756, 16'd753, 16'd750, 16'd748, 16'd745, 16'd742, 16'd740, 16'd737, 16'd734, 16'd732, 16'd729, 16'd726, 16'd724, 16'd721, 16'd718, 16'd715, 16'd712, 16'd710, 16'd707, 16'd704, 16'd701, 16'd698, 16'd695, 16'd692, 16'd690, 16'd687, 16'd684, 16'd681, 16'd678, 16'd675, 16'd672, 16'd669, 16'd666, 16'd663, 16'd660, 16'd657, 16'd653, 16'd650, 16'd647, 16'd644, 16'd641, 16'd638, 16'd634, 16'd631, 16'd628, 16'd625, 16'd621, 16'd618, 16'd615, 16'd611, 16'd608, 16'd605, 16'd601, 16'd598, 16'd594, 16'd591, 16'd587, 16'd584, 16'd580, 16'd576, 16'd573, 16'd569, 16'd565, 16'd562, 16'd558, 16'd554, 16'd550, 16'd546, 16'd542, 16'd538, 16'd535, 16'd531, 16'd527, 16'd522, 16'd518, 16'd514, 16'd510, 16'd506, 16'd501, 16'd497, 16'd493, 16'd488, 16'd484, 16'd479, 16'd475, 16'd470, 16'd465, 16'd461, 16'd456, 16'd451, 16'd446, 16'd441, 16'd436, 16'd431, 16'd426, 16'd420, 16'd415, 16'd410, 16'd404, 16'd398, 16'd393, 16'd387, 16'd381, 16'd375, 16'd369, 16'd362, 16'd356, 16'd349, 16'd342, 16'd335, 16'd328, 16'd321, 16'd313, 16'd306, 16'd298, 16'd289, 16'd281, 16'd272, 16'd263, 16'd253, 16'd243, 16'd232, 16'd221, 16'd209, 16'd196, 16'd181, 16'd166, 16'd148, 16'd127, 16'd101, 16'd61},
    reg_core: {4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // gamma at 16 bits, Config. 1: IL=10 Lmin=10 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00369
  localparam hbu_plan_t GAMMA16_C1 = '{
    func: F_GAMMA, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd8163, 16'd8105, 16'd8046, 16'd7987, 16'd7927, 16'd7867, 16'd7806, 16'd7745, 16'd7683, 16'd7620, 16'd7557, 16'd7493, 16'd7428, 16'd7363, 16'd7297, 16'd7230, 16'd7163, 16'd7095, 16'd7026, 16'd6956, 16'd6885, 16'd6813, 16'd6741, 16'd6667, 16'd6592, 16'd6517, 16'd6440, 16'd6362, 16'd6283, 16'd6203, 16'd6121, 16'd6038, 16'd5954, 16'd5868, 16'd5781, 16'd5692, 16'd5601, 16'd5508, 16'd5414, 16'd5317, 16'd5219, 16'd5117, 16'd5014, 16'd4907, 16'd4798, 16'd4686, 16'd4570, 16'd4451, 16'd4327, 16'd4199, 16'd4066, 16'd3928, 16'd3783, 16'd3631, 16'd3472, 16'd3302, 16'd3121, 16'd2926, 16'd2714, 16'd2480, 16'd2215, 16'd1903, 16'd1512, 16'd922},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // gelu at 16 bits, Config. 2: IL=8 Lmin=8 K=10 TRE=0.0006 TSE=0.0003; 256 sub-functions on 5 unary cores, mean absolute error 0.000395
  localparam hbu_plan_t GELU16_C2 = '{
    func: F_GELU, w: 16, k: 10, nreg: 256, ncore: 5,
    reg_start: {16'd65280, 16'd65024, 16'd64768, 16'd64512, 16'd64256, 16'd64000, 16'd63744, 16'd63488, 16'd63232, 16'd62976, 16'd62720, 16'd62464, 16'd62208, 16'd61952, 16'd61696, 16'd61440, 16'd61184, 16'd60928, 16'd60672, 16'd60416, 16'd60160, 16'd59904, 16'd59648, 16'd59392, 16'd59136, 16'd58880, 16'd58624, 16'd58368, 16'd58112, 16'd57856, 16'd57600, 16'd57344, 16'd57088, 16'd56832, 16'd56576, 16'd56320, 16'd56064, 16'd55808, 16'd55552, 16'd55296, 16'd55040, 16'd54784, 16'd54528, 16'd54272, 16'd54016, 16'd53760, 16'd53504, 16'd53248, 16'd52992, 16'd52736, 16'd52480, 16'd52224, 16'd51968, 16'd51712, 16'd51456, 16'd51200, 16'd50944, 16'd50688, 16'd50432, 16'd50176, 16'd49920, 16'd49664, 16'd49408, 16'd49152, 16'd48896, 16'd48640, 16'd48384, 16'd48128, 16'd47872, 16'd47616, 16'd47360, 16'd47104, 16'd46848, 16'd46592, 16'd46336, 16'd46080, 16'd45824, 16'd45568, 16'd45312, 16'd45056, 16'd44800, 16'd44544, 16'd44288, 16'd44032, 16'd43776, 16'd43520, 16'd43264, 16'd43008, 16'd42752, 16'd42496, 16'd42240, 16'd41984, 16'd41728, 16'd41472, 16'd41216, 16'd40960, 16'd40704, 16'd40448, 16'd40192, 16'd39936, 16'd39680, 16'd39424, 16'd39168, 16'd38912, 16'd38656, 16'd38400, 16'd38144, 16'd37888, 16'd37632, 16'd37376, 16'd37120, 16'd36864, 16'd36608, 16'd36352, 16'd36096, 16'd35840, 16'd35584, 16'd35328, 16'd35072, 16'd34816, 16'd34560, 16'd34304, 16'd34048, 16'd33792, 16'd33536, 16'd33280, 16'd33024, 16'd32768, 16'd32512, 16'd32256, 16'd32000, 16'd31744, 16'd31488, 16'd31232, 16'd30976, 16'd30720, 16'd30464, 16'd30208, 16'd29952, 16'd29696, 16'd29440, 16'd29184, 16'd28928, 16'd28672, 16'd28416, 16'd28160, 16'd27904, 16'd27648, 16'd27392, 16'd27136, 16'd26880, 16'd26624, 16'd26368, 16'd26112, 16'd25856, 16'd25600, 16'd25344, 16'd25088, 16'd24832, 16'd24576, 16'd24320, 16'd24064, 16'd23808, 16'd23552, 16'd23296, 16'd23040, 16'd22784, 16'd22528, 16'd22272, 16'd22016, 16'd21760, 16'd21504, 16'd21248, 16'd20992, 16'd20736, 16'd20480, 16'd20224, 16'd19968, 16'd19712, 16'd19456, 16'd19200, 16'd18944, 16'd18688, 16'd18432, 16'd18176, 16'd17920, 16'd17664, 16'd17408, 16'd17152, 16'd16896, 16'd16640, 16'd16384, 16'd16128, 16'd15872, 16'd15616, 16'd15360, 16'd15104, 16'd14848, 16'd14592, 16'd14336, 16'd14080, 16'd13824, 16'd13568, 16'd13312, 16'd13056, 16'd12800, 16'd12544, 16'd12288, 16'd12032, 16'd11776, 16'd11520, 16'd11264, 16'd11008, 16'd10752, 16'd10496, 16'd10240, 16'd9984, 16'd9728, 16'd9472, 16'd9216, 16'd8960, 16'd8704, 16'd8448, 16'd8192, 16'd7936, 16'd7680, 16'd7424, 16'd7168, 16'd6912, 16'd6656, 16'd6400, 16'd6144, 16'd5888, 16'd5632, 16'd5376, 16'd5120, 16'd4864, 16'd4608, 16'd4352, 16'd4096, 16'd3840, 16'd3584, 16'd3328, 16'd3072, 16'd2816, 16'd2560, 16'd2304, 16'd2048, 16'd1792, 16'd1536, 16'd1280, 16'd1024, 16'd768, 16'd512, 16'd256, 16'd0},
    reg_len: {5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8},
    reg_ub: {16'd1021, 16'd1017, 16'd1013, 16'd1009, 16'd1005, 16'd1001, 16'd997, 16'd993, 16'd989, 16'd985, 16'd981, 16'd977, 16'd973, 16'd969, 16'd965, 16'd961, 16'd957, 16'd953, 16'd949, 16'd945, 16'd941, 16'd937, 16'd933, 16'd929, 16'd925, 16'd921, 16'd917, 16'd913, 16'd909, 16'd905, 16'd901, 16'd897, 16'd893, 16'd889, 16'd885, 16'd881, 16'd877, 16'd873, 16'd869, 16'd865, 16'd861, 16'd857, 16'd853, 16'd849, 16'd845, 16'd841, 16'd837, 16'd833, 16'd829, 16'd825, 16'd821, 16'd817, 16'd813, 16'd809, 16'd805, 16'd801, 16'd797, 16'd793, 16'd789, 16'd785, 16'd781, 16'd777, 16'd773, 16'd769, 16'd765, 16'd761, 16'd757, 16'd753, 16'd749, 16'd745, 16'd741, 16'd737, 16'd733, 16'd729, 16'd725, 16'd721, 16'd717, 16'd713, 16'd709, 16'd705, 16'd701, 16'd697, 16'd693, 16'd689, 16'd685, 16'd681, 16'd677, 16'd673, 16'd668, 16'd664, 16'd660, 16'd656, 16'd652, 16'd647, 16'd643, 16'd639, 16'd634, 16'd630, 16'd626, 16'd621, 16'd617, 16'd612, 16'd608, 16'd603, 16'd599, 16'd594, 16'd590, 16'd585, 16'd581, 16'd576, 16'd572, 16'd568, 16'd563, 16'd559, 16'd555, 16'd551, 16'd547, 16'd543, 16'd539, 16'd535, 16'd532, 16'd529, 16'd525, 16'd522, 16'd520, 16'd517, 16'd515, 16'd513, 16'd511, 16'd509, 16'd507, 16'd506, 16'd505, 16'd503, 16'd503, 16'd502, 16'd501, 16'd501, 16'd501, 16'd501, 16'd501, 16'd501, 16'd501, 16'd501, 16'd502, 16'd502, 16'd502, 16'd503, 16'd503, 16'd504, 16'd504, 16'd505, 16'd505, 16'd506, 16'd506, 16'd507, 16'd507, 16'd508, 16'd508, 16'd508, 16'd509, 16'd509, 16'd509, 16'd510, 16'd510, 16'd510, 16'd510, 16'd510, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd511, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512, 16'd512},
    reg_core: {4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd4, 4'd0, 4'd0, 4'd4, 4'd4, 4'd0, 4'd0, 4'd1, 4'd0, 4'd2, 4'd1, 4'd2, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd3, 4'd1, 4'd0, 4'd1, 4'd3, 4'd1, 4'd3, 4'd1, 4'd0, 4'd1, 4'd0, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd0, 4'd2, 4'd2, 4'd1, 4'd1, 4'd0, 4'd0, 4'd3, 4'd2, 4'd2, 4'd2, 4'd2, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{11{8'd0}}, 8'd125, 8'd85, 8'd81, 8'd64, 8'd0}
  };

  // gelu at 16 bits, Config. 1: IL=10 Lmin=7 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00204
  localparam hbu_plan_t GELU16_C1 = '{
    func: F_GELU, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd8127, 16'd7999, 16'd7871, 16'd7743, 16'd7615, 16'd7487, 16'd7359, 16'd7231, 16'd7103, 16'd6975, 16'd6847, 16'd6719, 16'd6591, 16'd6463, 16'd6335, 16'd6207, 16'd6079, 16'd5951, 16'd5823, 16'd5694, 16'd5564, 16'd5434, 16'd5301, 16'd5165, 16'd5026, 16'd4884, 16'd4740, 16'd4596, 16'd4458, 16'd4330, 16'd4220, 16'd4131, 16'd4067, 16'd4028, 16'd4010, 16'd4010, 16'd4021, 16'd4036, 16'd4052, 16'd4066, 16'd4077, 16'd4085, 16'd4090, 16'd4093, 16'd4094, 16'd4095, 16'd4095, 16'd4095, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096, 16'd4096},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // sexp at 16 bits, Config. 2: IL=8 Lmin=8 K=10 TRE=0.0006 TSE=0.0003; 256 sub-functions on 4 unary cores, mean absolute error 0.000991
  localparam hbu_plan_t SEXP16_C2 = '{
    func: F_SEXP, w: 16, k: 10, nreg: 256, ncore: 4,
    reg_start: {16'd65280, 16'd65024, 16'd64768, 16'd64512, 16'd64256, 16'd64000, 16'd63744, 16'd63488, 16'd63232, 16'd62976, 16'd62720, 16'd62464, 16'd62208, 16'd61952, 16'd61696, 16'd61440, 16'd61184, 16'd60928, 16'd60672, 16'd60416, 16'd60160, 16'd59904, 16'd59648, 16'd59392, 16'd59136, 16'd58880, 16'd58624, 16'd58368, 16'd58112, 16'd57856, 16'd57600, 16'd57344, 16'd57088, 16'd56832, 16'd56576, 16'd56320, 16'd56064, 16'd55808, 16'd55552, 16'd55296, 16'd55040, 16'd54784, 16'd54528, 16'd54272, 16'd54016, 16'd53760, 16'd53504, 16'd53248, 16'd52992, 16'd52736, 16'd52480, 16'd52224, 16'd51968, 16'd51712, 16'd51456, 16'd51200, 16'd50944, 16'd50688, 16'd50432, 16'd50176, 16'd49920, 16'd49664, 16'd49408, 16'd49152, 16'd48896, 16'd48640, 16'd48384, 16'd48128, 16'd47872, 16'd47616, 16'd47360, 16'd47104, 16'd46848, 16'd46592, 16'd46336, 16'd46080, 16'd45824, 16'd45568, 16'd45312, 16'd45056, 16'd44800, 16'd44544, 16'd44288, 16'd44032, 16'd43776, 16'd43520, 16'd43264, 16'd43008, 16'd42752, 16'd42496, 16'd42240, 16'd41984, 16'd41728, 16'd41472, 16'd41216, 16'd40960, 16'd40704, 16'd40448, 16'd40192, 16'd39936, 16'd39680, 16'd39424, 16'd39168, 16'd38912, 16'd38656, 16'd38400, 16'd38144, 16'd37888, 16'd37632, 16'd37376, 16'd37120, 16'd36864, 16'd36608, 16'd36352, 16'd36096, 16'd35840, 16'd35584, 16'd35328, 16'd35072, 16'd34816, 16'd34560, 16'd34304, 16'd34048, 16'd33792, 16'd33536, 16'd33280, 16'd33024, 16'd32768, 16'd32512, 16'd32256, 16'd32000, 16'd31744, 16'd31488, 16'd31232, 16'd30976, 16'd30720, 16'd30464, 16'd30208, 16'd29952, 16'd29696, 16'd29440, 16'd29184, 16'd28928, 16'd28672, 16'd28416, 16'd28160, 16'd27904, 16'd27648, 16'd27392, 16'd27136, 16'd26880, 16'd26624, 16'd26368, 16'd26112, 16'd25856, 16'd25600, 16'd25344, 16'd25088, 16'd24832, 16'd24576, 16'd24320, 16'd24064, 16'd23808, 16'd23552, 16'd23296, 16'd23040, 16'd22784, 16'd22528, 16'd22272, 16'd22016, 16'd21760, 16'd21504, 16'd21248, 16'd20992, 16'd20736, 16'd20480, 16'd20224, 16'd19968, 16'd19712, 16'd19456, 16'd19200, 16'd18944, 16'd18688, 16'd18432, 16'd18176, 16'd17920, 16'd17664, 16'd17408, 16'd17152, 16'd16896, 16'd16640, 16'd16384, 16'd16128, 16'd15872, 16'd15616, 16'd15360, 16'd15104, 16'd14848, 16'd14592, 16'd14336, 16'd14080, 16'd13824, 16'd13568, 16'd13312, 16'd13056, 16'd12800, 16'd12544, 16'd12288, 16'd12032, 16'd11776, 16'd11520, 16'd11264, 16'd11008, 16'd10752, 16'd10496, 16'd10240, 16'd9984, 16'd9728, 16'd9472, 16'd9216, 16'd8960, 16'd8704, 16'd8448, 16'd8192, 16'd7936, 16'd7680, 16'd7424, 16'd7168, 16'd6912, 16'd6656, 16'd6400, 16'd6144, 16'd5888, 16'd5632, 16'd5376, 16'd5120, 16'd4864, 16'd4608, 16'd4352, 16'd4096, 16'd3840, 16'd3584, 16'd3328, 16'd3072, 16'd2816, 16'd2560, 16'd2304, 16'd2048, 16'd1792, 16'd1536, 16'd1280, 16'd1024, 16'd768, 16'd512, 16'd256, 16'd0},
    reg_len: {5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8},
    reg_ub: {16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd986, 16'd927, 16'd870, 16'd818, 16'd768, 16'd721, 16'd678, 16'd637, 16'd598, 16'd562, 16'd528, 16'd496, 16'd466, 16'd437, 16'd411, 16'd386, 16'd363, 16'd341, 16'd320, 16'd300, 16'd282, 16'd265, 16'd249, 16'd234, 16'd220, 16'd206, 16'd194, 16'd182, 16'd171, 16'd161, 16'd151, 16'd142, 16'd133, 16'd125, 16'd117, 16'd110, 16'd104, 16'd97, 16'd91, 16'd86, 16'd81, 16'd76, 16'd71, 16'd67, 16'd63, 16'd59, 16'd55, 16'd52, 16'd49, 16'd46, 16'd43, 16'd40, 16'd38, 16'd35, 16'd33, 16'd31, 16'd29, 16'd28, 16'd26, 16'd24, 16'd23, 16'd21, 16'd20, 16'd19, 16'd18, 16'd16, 16'd15, 16'd14, 16'd14, 16'd13, 16'd12, 16'd11, 16'd10, 16'd10, 16'd9, 16'd9, 16'd8, 16'd8, 16'd7, 16'd7, 16'd6, 16'd6, 16'd5, 16'd5, 16'd5, 16'd4, 16'd4, 16'd4, 16'd4, 16'd3, 16'd3, 16'd3, 16'd3, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0},
    reg_core: {4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd2, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd3, 4'd3, 4'd2, 4'd0, 4'd3, 4'd2, 4'd0, 4'd1, 4'd1, 4'd0, 4'd0, 4'd2, 4'd2, 4'd2, 4'd0, 4'd0, 4'd0, 4'd1, 4'd2, 4'd0, 4'd1, 4'd0, 4'd1, 4'd0, 4'd1, 4'd0, 4'd1, 4'd0, 4'd2, 4'd1, 4'd0, 4'd2, 4'd1, 4'd0, 4'd0, 4'd1, 4'd1, 4'd0, 4'd0, 4'd2, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd2, 4'd2, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{12{8'd0}}, 8'd80, 8'd25, 8'd17, 8'd0}
  };

  // sexp at 16 bits, Config. 1: IL=10 Lmin=10 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00404
  localparam hbu_plan_t SEXP16_C1 = '{
    func: F_SEXP, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd8191, 16'd7651, 16'd5958, 16'd4640, 16'd3614, 16'd2814, 16'd2192, 16'd1707, 16'd1329, 16'd1035, 16'd806, 16'd628, 16'd489, 16'd380, 16'd296, 16'd231, 16'd180, 16'd140, 16'd109, 16'd85, 16'd66, 16'd51, 16'd40, 16'd31, 16'd24, 16'd19, 16'd14, 16'd11, 16'd9, 16'd7, 16'd5, 16'd4, 16'd3, 16'd2, 16'd2, 16'd1},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

  // sq at 8 bits, Config. 2: IL=6 Lmin=3 K=3 TRE=0.001 TSE=0; 15 sub-functions on 15 unary cores, mean absolute error 0.000458
  localparam hbu_plan_t SQ8_C2 = '{
    func: F_SQ, w: 8, k: 3, nreg: 15, ncore: 15,
    reg_start: {{241{16'd0}}, 16'd240, 16'd224, 16'd216, 16'd208, 16'd200, 16'd192, 16'd184, 16'd176, 16'd160, 16'd128, 16'd96, 16'd88, 16'd80, 16'd64, 16'd0},
    reg_len: {{241{5'd0}}, 5'd4, 5'd4, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd4, 5'd5, 5'd5, 5'd3, 5'd3, 5'd4, 5'd6},
    reg_ub: {{241{16'd0}}, 16'd7, 16'd6, 16'd5, 16'd5, 16'd5, 16'd4, 16'd4, 16'd3, 16'd3, 16'd2, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0},
    reg_core: {{241{4'd0}}, 4'd14, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8, 4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1, 4'd0},
    core_rep: {{1{8'd0}}, 8'd14, 8'd13, 8'd12, 8'd11, 8'd10, 8'd9, 8'd8, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1, 8'd0}
  };

  // sq at 8 bits, Config. 1: IL=5 Lmin=4 K=5 TRE=0.01 TSE=0.003; 13 sub-functions on 5 unary cores, mean absolute error 0.00969
  localparam hbu_plan_t SQ8_C1 = '{
    func: F_SQ, w: 8, k: 5, nreg: 13, ncore: 5,
    reg_start: {{243{16'd0}}, 16'd240, 16'd224, 16'd208, 16'd192, 16'd176, 16'd160, 16'd144, 16'd128, 16'd112, 16'd96, 16'd64, 16'd32, 16'd0},
    reg_len: {{243{5'd0}}, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd5, 5'd5, 5'd5},
    reg_ub: {{243{16'd0}}, 16'd29, 16'd26, 16'd22, 16'd19, 16'd16, 16'd13, 16'd11, 16'd9, 16'd7, 16'd5, 16'd3, 16'd1, 16'd0},
    reg_core: {{243{4'd0}}, 4'd4, 4'd2, 4'd4, 4'd4, 4'd4, 4'd4, 4'd2, 4'd2, 4'd3, 4'd2, 4'd1, 4'd1, 4'd0},
    core_rep: {{11{8'd0}}, 8'd7, 8'd4, 8'd3, 8'd1, 8'd0}
  };

  // sqrt at 8 bits, Config. 2: IL=6 Lmin=3 K=3 TRE=0.001 TSE=0; 12 sub-functions on 12 unary cores, mean absolute error 0.000778
  localparam hbu_plan_t SQRT8_C2 = '{
    func: F_SQRT, w: 8, k: 3, nreg: 12, ncore: 12,
    reg_start: {{244{16'd0}}, 16'd192, 16'd160, 16'd144, 16'd128, 16'd96, 16'd64, 16'd48, 16'd40, 16'd32, 16'd16, 16'd8, 16'd0},
    reg_len: {{244{5'd0}}, 5'd6, 5'd5, 5'd4, 5'd4, 5'd5, 5'd5, 5'd4, 5'd3, 5'd3, 5'd4, 5'd3, 5'd3},
    reg_ub: {{244{16'd0}}, 16'd7, 16'd6, 16'd6, 16'd5, 16'd5, 16'd4, 16'd3, 16'd3, 16'd2, 16'd2, 16'd1, 16'd0},
    reg_core: {{244{4'd0}}, 4'd11, 4'd10, 4'd9, 4'd8, 4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1, 4'd0},
    core_rep: {{4{8'd0}}, 8'd11, 8'd10, 8'd9, 8'd8, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1, 8'd0}
  };

  // sqrt at 8 bits, Config. 1: IL=4 Lmin=3 K=6 TRE=0.008 TSE=0.003; 21 sub-functions on 2 unary cores, mean absolute error 0.00827
  localparam hbu_plan_t SQRT8_C1 = '{
    func: F_SQRT, w: 8, k: 6, nreg: 21, ncore: 2,
    reg_start: {{235{16'd0}}, 16'd240, 16'd224, 16'd208, 16'd192, 16'd176, 16'd160, 16'd144, 16'd128, 16'd112, 16'd96, 16'd80, 16'd72, 16'd64, 16'd56, 16'd48, 16'd40, 16'd32, 16'd24, 16'd16, 16'd8, 16'd0},
    reg_len: {{235{5'd0}}, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd4, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3, 5'd3},
    reg_ub: {{235{16'd0}}, 16'd62, 16'd60, 16'd58, 16'd56, 16'd54, 16'd51, 16'd49, 16'd46, 16'd43, 16'd40, 16'd37, 16'd34, 16'd32, 16'd30, 16'd28, 16'd26, 16'd23, 16'd21, 16'd17, 16'd13, 16'd7},
    reg_core: {{235{4'd0}}, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{14{8'd0}}, 8'd10, 8'd0}
  };

  // tanh at 16 bits, Config. 2: IL=8 Lmin=8 K=10 TRE=0.0006 TSE=0.0003; 256 sub-functions on 5 unary cores, mean absolute error 0.000909
  localparam hbu_plan_t TANH16_C2 = '{
    func: F_TANH, w: 16, k: 10, nreg: 256, ncore: 5,
    reg_start: {16'd65280, 16'd65024, 16'd64768, 16'd64512, 16'd64256, 16'd64000, 16'd63744, 16'd63488, 16'd63232, 16'd62976, 16'd62720, 16'd62464, 16'd62208, 16'd61952, 16'd61696, 16'd61440, 16'd61184, 16'd60928, 16'd60672, 16'd60416, 16'd60160, 16'd59904, 16'd59648, 16'd59392, 16'd59136, 16'd58880, 16'd58624, 16'd58368, 16'd58112, 16'd57856, 16'd57600, 16'd57344, 16'd57088, 16'd56832, 16'd56576, 16'd56320, 16'd56064, 16'd55808, 16'd55552, 16'd55296, 16'd55040, 16'd54784, 16'd54528, 16'd54272, 16'd54016, 16'd53760, 16'd53504, 16'd53248, 16'd52992, 16'd52736, 16'd52480, 16'd52224, 16'd51968, 16'd51712, 16'd51456, 16'd51200, 16'd50944, 16'd50688, 16'd50432, 16'd50176, 16'd49920, 16'd49664, 16'd49408, 16'd49152, 16'd48896, 16'd48640, 16'd48384, 16'd48128, 16'd47872, 16'd47616, 16'd47360, 16'd47104, 16'd46848, 16'd46592, 16'd46336, 16'd46080, 16'd45824, 16'd45568, 16'd45312, 16'd45056, 16'd44800, 16'd44544, 16'd44288, 16'd44032, 16'd43776, 16'd43520, 16'd43264, 16'd43008, 16'd42752, 16'd42496, 16'd42240, 16'd41984, 16'd41728, 16'd41472, 16'd41216, 16'd40960, 16'd40704, 16'd40448, 16'd40192, 16'd39936, 16'd39680, 16'd39424, 16'd39168, 16'd38912, 16'd38656, 16'd38400, 16'd38144, 16'd37888, 16'd37632, 16'd37376, 16'd37120, 16'd36864, 16'd36608, 16'd36352, 16'd36096, 16'd35840, 16'd35584, 16'd35328, 16'd35072, 16'd34816, 16'd34560, 16'd34304, 16'd34048, 16'd33792, 16'd33536, 16'd33280, 16'd33024, 16'd32768, 16'd32512, 16'd32256, 16'd32000, 16'd31744, 16'd31488, 16'd31232, 16'd30976, 16'd30720, 16'd30464, 16'd30208, 16'd29952, 16'd29696, 16'd29440, 16'd29184, 16'd28928, 16'd28672, 16'd28416, 16'd28160, 16'd27904, 16'd27648, 16'd27392, 16'd27136, 16'd26880, 16'd26624, 16'd26368, 16'd26112, 16'd25856, 16'd25600, 16'd25344, 16'd25088, 16'd24832, 16'd24576, 16'd24320, 16'd24064, 16'd23808, 16'd23552, 16'd23296, 16'd23040, 16'd22784, 16'd22528, 16'd22272, 16'd22016, 16'd21760, 16'd21504, 16'd21248, 16'd20992, 16'd20736, 16'd20480, 16'd20224, 16'd19968, 16'd19712, 16'd19456, 16'd19200, 16'd18944, 16'd18688, 16'd18432, 16'd18176, 16'd17920, 16'd17664, 16'd17408, 16'd17152, 16'd16896, 16'd16640, 16'd16384, 16'd16128, 16'd15872, 16'd15616, 16'd15360, 16'd15104, 16'd14848, 16'd14592, 16'd14336, 16'd14080, 16'd13824, 16'd13568, 16'd13312, 16'd13056, 16'd12800, 16'd12544, 16'd12288, 16'd12032, 16'd11776, 16'd11520, 16'd11264, 16'd11008, 16'd10752, 16'd10496, 16'd10240, 16'd9984, 16'd9728, 16'd9472, 16'd9216, 16'd8960, 16'd8704, 16'd8448, 16'd8192, 16'd7936, 16'd7680, 16'd7424, 16'd7168, 16'd6912, 16'd6656, 16'd6400, 16'd6144, 16'd5888, 16'd5632, 16'd5376, 16'd5120, 16'd4864, 16'd4608, 16'd4352, 16'd4096, 16'd3840, 16'd3584, 16'd3328, 16'd3072, 16'd2816, 16'd2560, 16'd2304, 16'd2048, 16'd1792, 16'd1536, 16'd1280, 16'd1024, 16'd768, 16'd512, 16'd256, 16'd0},
    reg_len: {5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8, 5'd8},
    reg_ub: {16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1023, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1022, 16'd1021, 16'd1021, 16'd1021, 16'd1021, 16'd1021, 16'd1021, 16'd1021, 16'd1020, 16'd1020, 16'd1020, 16'd1020, 16'd1019, 16'd1019, 16'd1019, 16'd1019, 16'd1018, 16'd1018, 16'd1018, 16'd1017, 16'd1017, 16'd1016, 16'd1016, 16'd1016, 16'd1015, 16'd1014, 16'd1014, 16'd1013, 16'd1013, 16'd1012, 16'd1011, 16'd1010, 16'd1010, 16'd1009, 16'd1008, 16'd1007, 16'd1006, 16'd1005, 16'd1003, 16'd1002, 16'd1001, 16'd999, 16'd998, 16'd996, 16'd994, 16'd993, 16'd991, 16'd989, 16'd986, 16'd984, 16'd982, 16'd979, 16'd976, 16'd973, 16'd970, 16'd967, 16'd964, 16'd960, 16'd956, 16'd952, 16'd948, 16'd944, 16'd939, 16'd934, 16'd929, 16'd923, 16'd917, 16'd911, 16'd905, 16'd898, 16'd891, 16'd884, 16'd876, 16'd868, 16'd859, 16'd851, 16'd841, 16'd832, 16'd822, 16'd812, 16'd801, 16'd790, 16'd778, 16'd767, 16'd754, 16'd742, 16'd729, 16'd716, 16'd702, 16'd688, 16'd674, 16'd659, 16'd644, 16'd629, 16'd614, 16'd599, 16'd583, 16'd567, 16'd551, 16'd535, 16'd519, 16'd503, 16'd487, 16'd472, 16'd456, 16'd440, 16'd424, 16'd409, 16'd394, 16'd379, 16'd364, 16'd349, 16'd335, 16'd321, 16'd307, 16'd294, 16'd281, 16'd269, 16'd256, 16'd245, 16'd233, 16'd222, 16'd211, 16'd201, 16'd191, 16'd182, 16'd172, 16'd164, 16'd155, 16'd147, 16'd139, 16'd132, 16'd125, 16'd118, 16'd112, 16'd106, 16'd100, 16'd94, 16'd89, 16'd84, 16'd79, 16'd75, 16'd71, 16'd67, 16'd63, 16'd59, 16'd56, 16'd53, 16'd50, 16'd47, 16'd44, 16'd41, 16'd39, 16'd37, 16'd34, 16'd32, 16'd30, 16'd29, 16'd27, 16'd25, 16'd24, 16'd22, 16'd21, 16'd20, 16'd19, 16'd17, 16'd16, 16'd15, 16'd14, 16'd13, 16'd13, 16'd12, 16'd11, 16'd10, 16'd10, 16'd9, 16'd9, 16'd8, 16'd8, 16'd7, 16'd7, 16'd6, 16'd6, 16'd5, 16'd5, 16'd5, 16'd4, 16'd4, 16'd4, 16'd4, 16'd3, 16'd3, 16'd3, 16'd3, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0},
    reg_core: {4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd4, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd1, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd1, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1, 4'd3, 4'd0, 4'd1, 4'd0, 4'd3, 4'd1, 4'd0, 4'd2, 4'd2, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd3, 4'd2, 4'd3, 4'd3, 4'd1, 4'd0, 4'd3, 4'd1, 4'd0, 4'd1, 4'd3, 4'd0, 4'd0, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd2, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{11{8'd0}}, 8'd238, 8'd66, 8'd17, 8'd10, 8'd0}
  };

  // tanh at 16 bits, Config. 1: IL=10 Lmin=10 K=13 TRE=0.006 TSE=0.001; 64 sub-functions on 1 unary cores, mean absolute error 0.00389
  localparam hbu_plan_t TANH16_C1 = '{
    func: F_TANH, w: 16, k: 13, nreg: 64, ncore: 1,
    reg_start: {{192{16'd0}}, 16'd64512, 16'd63488, 16'd62464, 16'd61440, 16'd60416, 16'd59392, 16'd58368, 16'd57344, 16'd56320, 16'd55296, 16'd54272, 16'd53248, 16'd52224, 16'd51200, 16'd50176, 16'd49152, 16'd48128, 16'd47104, 16'd46080, 16'd45056, 16'd44032, 16'd43008, 16'd41984, 16'd40960, 16'd39936, 16'd38912, 16'd37888, 16'd36864, 16'd35840, 16'd34816, 16'd33792, 16'd32768, 16'd31744, 16'd30720, 16'd29696, 16'd28672, 16'd27648, 16'd26624, 16'd25600, 16'd24576, 16'd23552, 16'd22528, 16'd21504, 16'd20480, 16'd19456, 16'd18432, 16'd17408, 16'd16384, 16'd15360, 16'd14336, 16'd13312, 16'd12288, 16'd11264, 16'd10240, 16'd9216, 16'd8192, 16'd7168, 16'd6144, 16'd5120, 16'd4096, 16'd3072, 16'd2048, 16'd1024, 16'd0},
    reg_len: {{192{5'd0}}, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10, 5'd10},
    reg_ub: {{192{16'd0}}, 16'd8188, 16'd8188, 16'd8186, 16'd8185, 16'd8183, 16'd8181, 16'd8178, 16'd8174, 16'd8169, 16'd8162, 16'd8154, 16'd8143, 16'd8129, 16'd8112, 16'd8090, 16'd8061, 16'd8025, 16'd7979, 16'd7920, 16'd7847, 16'd7754, 16'd7638, 16'd7494, 16'd7317, 16'd7102, 16'd6844, 16'd6538, 16'd6184, 16'd5781, 16'd5335, 16'd4854, 16'd4351, 16'd3840, 16'd3336, 16'd2855, 16'd2410, 16'd2007, 16'd1653, 16'd1347, 16'd1089, 16'd873, 16'd697, 16'd553, 16'd437, 16'd344, 16'd271, 16'd212, 16'd166, 16'd130, 16'd101, 16'd79, 16'd62, 16'd48, 16'd37, 16'd29, 16'd23, 16'd17, 16'd14, 16'd10, 16'd8, 16'd6, 16'd5, 16'd4, 16'd3},
    reg_core: {{192{4'd0}}, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0},
    core_rep: {{15{8'd0}}, 8'd0}
  };

endpackage
