// des_tv_pkg: known-answer vectors for the DES testbenches.
//
// Every value here was computed by a software DES model that was itself
// checked against a reference cryptographic library, so the testbenches
// compare the hardware with numbers that do not come from the RTL.
// Vector 0 is the widely published example key 133457799BBCDFF1 /
// plaintext 0123456789ABCDEF; vector 1 is key 0E329232EA6D0D73 /
// plaintext 8787878787878787, whose ciphertext is zero. The rest are random.
package des_tv_pkg;
  localparam int unsigned N_KAT = 40;
  localparam logic [63:0] KAT_KEY [N_KAT] = '{
    64'h133457799bbcdff1,
    64'h0e329232ea6d0d73,
    64'hf2a74de452e6b438,
    64'h0c5c7fd0a6a3a450,
    64'h1818e811892f902b,
    64'he8e25d940ed90475,
    64'h1600a35a099950d8,
    64'h3d9c172411e20b8f,
    64'h0f21ddb66cad4a26,
    64'hf28c105d1fb17c23,
    64'h953f48f1a09f76b5,
    64'h95e60af593bd04cf,
    64'h3898d190f9ebdacc,
    64'h2217beaddbc496cb,
    64'h8a6a63ec24ede6a4,
    64'h8f6d05584ef8aa38,
    64'h1a61dbe22e44158b,
    64'h301850c5a38fd547,
    64'hb64ce4228c38fb29,
    64'h9e7769b10f4205b4,
    64'h881ed162ae2eb154,
    64'h7731af10506bf2ef,
    64'h5c90a9587403e430,
    64'h2e05319acb5c7427,
    64'h14f4733f3e7d1bfb,
    64'h7ebff20686734721,
    64'h72e6cc3ababced20,
    64'h12bd4acefaecbd38,
    64'h2a3af4d46b0a18e8,
    64'heeeacbe226e87555,
    64'hf646e1f40a097c97,
    64'h8ede0d7ac3baea9e,
    64'hdda1494c73cf256d,
    64'hc7fde805ec99108d,
    64'hdae445508201e2bd,
    64'hcdcc69292f45e678,
    64'h9d2c67eda13ffe79,
    64'h7253edc618187993,
    64'h89e7d15f17362f25,
    64'ha26b7f62b1852f27
  };
  localparam logic [63:0] KAT_PT [N_KAT] = '{
    64'h0123456789abcdef,
    64'h8787878787878787,
    64'h6513270e269e0d37,
    64'hd23f0824128b2f33,
    64'h9531985d5d9dc9f8,
    64'h36f675cc81e74ef5,
    64'h6b0d549b6f03675a,
    64'h8d116ece1738f7d9,
    64'h90c192cfd3ac94af,
    64'ha170b33839263059,
    64'h0fd630f1f29d0da9,
    64'h0cb1e29c658cda14,
    64'h8e81973e0becd7b0,
    64'h6b4cb2424a23d596,
    64'h922766581e27a1c0,
    64'hae97ba94d0eda82f,
    64'h923a736994e3bf91,
    64'h18f135d25f557203,
    64'h907a70c31012f037,
    64'h7f15052434b9b5df,
    64'hc6f877186d76b07e,
    64'hec66a78795e761d1,
    64'h3f98e2774cbd87ad,
    64'hc7a2ea20b2f14c94,
    64'h4cdd2055930d6eaf,
    64'h57ee05cde00902c7,
    64'h9be4bcfc49b64a08,
    64'h830e07bc1e398f10,
    64'h5790f82ec1d3fcff,
    64'h6bf46c697d2caf82,
    64'h13deef86ab1031d0,
    64'hca02135e92b1d3f2,
    64'hdb5b5fab8f4d3e27,
    64'h73ab48767734d7c1,
    64'h309d6b79965eda32,
    64'h79cb9e86830c71c2,
    64'h2fa91425cb008853,
    64'h244caf9c4dabb481,
    64'he3eff9c0cf44dd3f,
    64'h986e86cb0ab8ab67
  };
  localparam logic [63:0] KAT_CT [N_KAT] = '{
    64'h85e813540f0ab405,
    64'h0000000000000000,
    64'h391bbccb4492fc51,
    64'h57a4490e488dd87a,
    64'h1c83b420f9b5ac73,
    64'h39cee5c11cdb1c39,
    64'h2850d47958dfd9ec,
    64'h62ce54688eeb83ca,
    64'hd27e0cb82efff308,
    64'hd90560ea56fa3dcf,
    64'h41a534a393c1892d,
    64'h1bf0bd5f8aa071d0,
    64'hacfc8ac2b92b7ad7,
    64'he118cb2e51b2dcdf,
    64'h2b34124a8f32d2a6,
    64'h254cac281cc038bd,
    64'h4e38973eba0a182e,
    64'hd2acafe13110d520,
    64'hd86ab00fb05c1158,
    64'h68294b8641f8901f,
    64'h37a4da88e4aab0bb,
    64'h5541d8e4c7f51664,
    64'h9cb39f6ec87381df,
    64'hb006793e6d4de466,
    64'h10f42e8a4572901a,
    64'hc0ca5f3707c2959a,
    64'hd65d92937a7271fd,
    64'hef42a3ec3b71e8e4,
    64'h5fb1dcbaa3ca8065,
    64'h182bb4b25097c43a,
    64'haf01129a90cca0ee,
    64'hbee9934824a93934,
    64'h0c563e07c318ae41,
    64'hed70be9d6e37c0d1,
    64'h13a676b07cbabaaf,
    64'h88f16f1b7d3b13d9,
    64'h39c80161e9842fe6,
    64'hd0467b21e73b98d7,
    64'h28c056922ccacd3b,
    64'h030c93e38a9119fd
  };
  // Vector 0 intermediate values.
  localparam logic [63:0] V0_IP = 64'hcc00ccfff0aaf0aa;   // IP(plaintext)
  localparam logic [55:0] V0_CD0 = 56'hf0ccaaf556678f;  // PC-1(key)
  localparam logic [47:0] V0_K [16] = '{
    48'h1b02effc7072,
    48'h79aed9dbc9e5,
    48'h55fc8a42cf99,
    48'h72add6db351d,
    48'h7cec07eb53a8,
    48'h63a53e507b2f,
    48'hec84b7f618bc,
    48'hf78a3ac13bfb,
    48'he0dbebede781,
    48'hb1f347ba464f,
    48'h215fd3ded386,
    48'h7571f59467e9,
    48'h97c5d1faba41,
    48'h5f43b7f2e73a,
    48'hbf918d3d3f0a,
    48'hcb3d8b0e17f5
  };
  // L and R entering rounds 1..16, then after round 16.
  localparam logic [31:0] V0_L [17] = '{
    32'hcc00ccff,
    32'hf0aaf0aa,
    32'hef4a6544,
    32'hcc017709,
    32'ha25c0bf4,
    32'h77220045,
    32'h8a4fa637,
    32'he967cd69,
    32'h064aba10,
    32'hd5694b90,
    32'h247cc67a,
    32'hb7d5d7b2,
    32'hc5783c78,
    32'h75bd1858,
    32'h18c3155a,
    32'hc28c960d,
    32'h43423234
  };
  localparam logic [31:0] V0_R [17] = '{
    32'hf0aaf0aa,
    32'hef4a6544,
    32'hcc017709,
    32'ha25c0bf4,
    32'h77220045,
    32'h8a4fa637,
    32'he967cd69,
    32'h064aba10,
    32'hd5694b90,
    32'h247cc67a,
    32'hb7d5d7b2,
    32'hc5783c78,
    32'h75bd1858,
    32'h18c3155a,
    32'hc28c960d,
    32'h43423234,
    32'h0a4cd995
  };
  // f(R, K) of rounds 1..16.
  localparam logic [31:0] V0_F [16] = '{
    32'h234aa9bb,
    32'h3cab87a3,
    32'h4d166eb0,
    32'hbb23774c,
    32'h2813adc3,
    32'h9e45cd2c,
    32'h8c051c27,
    32'h3c0e86f9,
    32'h22367c6a,
    32'h62bc9c22,
    32'he104fa02,
    32'hc268cfea,
    32'hddbb2922,
    32'hb7318e55,
    32'h5b81276e,
    32'hc8c04f98
  };
  // S-box spot checks: box (0 = S1), 6-bit input, 4-bit output.
  localparam int unsigned N_SPOT = 24;
  localparam int unsigned SPOT_BOX [N_SPOT] = '{6, 2, 1, 0, 3, 7, 7, 3, 7, 1, 4, 1, 5, 4, 1, 6, 4, 1, 0, 3, 7, 6, 1, 4};
  localparam logic [5:0] SPOT_IN [N_SPOT] = '{6'd57, 6'd1, 6'd7, 6'd24, 6'd3, 6'd41, 6'd25, 6'd37, 6'd0, 6'd58, 6'd52, 6'd32, 6'd29, 6'd3, 6'd13, 6'd13, 6'd49, 6'd2, 6'd27, 6'd6, 6'd48, 6'd53, 6'd25, 6'd43};
  localparam logic [3:0] SPOT_OUT [N_SPOT] = '{4'd14, 4'd13, 4'd7, 4'd5, 4'd8, 4'd4, 4'd0, 4'd0, 4'd13, 4'd3, 4'd12, 4'd0, 4'd3, 4'd11, 4'd8, 4'd1, 4'd6, 4'd1, 4'd5, 4'd3, 4'd0, 4'd0, 4'd6, 4'd14};
endpackage
